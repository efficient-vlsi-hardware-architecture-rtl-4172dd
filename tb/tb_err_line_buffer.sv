// tb_err_line_buffer - pushes random errors, with idle cycles in between,
// into a 20-pixel-wide line buffer and checks, while each value is being
// pushed, that each of the 169 window positions holds the value pushed 12-r
// lines and 12-c pixels before it (the incoming value at position (12,12)),
// and that the window does not move on idle cycles.
module tb_err_line_buffer;
  import dbs_pkg::*;

  localparam int W = 20;

  logic clk = 0, push = 0;
  err_t din = '0;
  err_t win [MASK_N][MASK_N];
  int checks = 0, failures = 0;
  err_t hist [$];

  err_line_buffer #(.IMG_W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_window();
    for (int r = 0; r < int'(MASK_N); r++)
      for (int c = 0; c < int'(MASK_N); c++) begin
        int idx = hist.size() - 1 - (12 - r) * W - (12 - c);
        if (idx >= 0) begin
          checks++;
          if (win[r][c] !== hist[idx]) begin
            failures++;
            if (failures < 10) $display("FAIL r=%0d c=%0d got %0d exp %0d", r, c, win[r][c], hist[idx]);
          end
        end
      end
  endtask

  // Inputs change on the falling edge, away from the sampling edge.
  task automatic do_push(err_t v);
    @(negedge clk);
    push = 1;
    din  = v;
    hist.push_back(v);
    #1;
    check_window();
    // idle cycle: the stored words must not move
    if ($urandom_range(0, 3) == 0) begin
      @(negedge clk);
      push = 0;
      din  = v + 1;
      hist.push_back(din);
      #1;
      check_window();
      void'(hist.pop_back());
    end
  endtask

  initial begin
    for (int k = 0; k < 20 * W; k++)
      do_push(err_t'(int'($urandom_range(0, 4095)) - 2048));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
