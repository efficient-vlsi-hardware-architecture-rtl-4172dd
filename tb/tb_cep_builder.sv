// tb_cep_builder - streams two random 24x16 images into the table builder,
// the first at full rate and the second (after clear) with random gaps, and
// checks that every table entry is written exactly once with the value of a
// direct zero-padded 13x13 convolution of e = 255*g - f, that nothing is
// accepted outside the load phase, and that done rises IMG_W*IMG_H +
// 6*IMG_W + 6 cycles after the first pixel of a full-rate image.
module tb_cep_builder;
  import dbs_pkg::*;
  import dbs_ref_pkg::*;

  localparam int W = 24;
  localparam int H = 16;
  localparam int N = W * H;
  localparam int AW = $clog2(N);

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_g = 0;
  logic [7:0] in_f = '0;
  logic in_ready, wr_en, done;
  logic [AW-1:0] ld_addr, wr_addr;
  cep_t wr_data;
  int checks = 0, failures = 0, cyc = 0;
  longint got [N];
  int     nwr [N];

  cep_builder #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (wr_en) begin
      got[wr_addr] = longint'(wr_data);
      nwr[wr_addr]++;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(bit gaps);
    dbs_ref r = new(W, H);
    int t0 = -1, td;
    for (int p = 0; p < N; p++) begin
      r.g[p] = $urandom_range(0, 1);
      r.f[p] = $urandom_range(0, 255);
      nwr[p] = 0;
    end
    r.build();
    for (int p = 0; p < N; p++) begin
      while (gaps && $urandom_range(0, 3) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1;
      in_g <= r.g[p];
      in_f <= 8'(r.f[p]);
      #1;
      check(in_ready && int'(ld_addr) == p, $sformatf("ready/ld_addr at pixel %0d", p));
      if (t0 < 0) t0 = cyc;
      @(posedge clk);
    end
    // offered pixels after the image must be ignored
    in_valid <= 1;
    in_g <= 1;
    in_f <= 8'd0;
    #1;
    check(!in_ready, "not ready after the last pixel");
    while (!done) @(posedge clk);
    td = cyc;
    in_valid <= 0;
    if (!gaps) check(td - t0 == N + 6 * W + 6, $sformatf("done after %0d cycles", td - t0));
    for (int p = 0; p < N; p++) begin
      check(nwr[p] == 1, $sformatf("entry %0d written %0d times", p, nwr[p]));
      check(got[p] == r.cep[p], $sformatf("entry %0d: %0d vs %0d", p, got[p], r.cep[p]));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(0);
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
