// tb_dbs_full - one complete operation of the DBS engine at its default
// size, a 256x256 image. The gray image is a smooth synthetic scene (a
// horizontal ramp, a bright disc and a dark band) and the initial halftone is
// random noise. The streamed result, the number of passes and the number of
// accepted changes are compared with the software reference in dbs_ref_pkg,
// and the cycle count from the last input pixel to finish is checked against
// 6*256+6 flush cycles plus 65,536 cycles per pass.
module tb_dbs_full;
  import dbs_pkg::*;
  import dbs_ref_pkg::*;

  localparam int W = 256;
  localparam int H = 256;
  localparam int N = W * H;

  logic clk = 0, reset = 0;
  logic [8:0] rb_Q = '0;
  logic in_en = 0;
  logic finish, dataout_en, data;
  logic [7:0] iter_count;
  logic [31:0] update_count;
  logic [$clog2(N):0] dbs_count;

  int checks = 0, failures = 0, cyc = 0;

  dbs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    dbs_ref ref_m;
    int nout, t_last, t_fin, v, bad;
    ref_m = new(W, H);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        v = x;                                                  // ramp
        if ((x - 170) * (x - 170) + (y - 90) * (y - 90) < 50 * 50) v = 230;  // disc
        if (y >= 180 && y < 210) v = 25;                        // dark band
        ref_m.f[y*W + x] = v;
        ref_m.g[y*W + x] = $urandom_range(0, 1);
      end
    repeat (3) @(posedge clk);
    reset <= 1;
    @(posedge clk);
    for (int p = 0; p < N; p++) begin
      in_en <= 1;
      rb_Q  <= {ref_m.g[p], 8'(ref_m.f[p])};
      @(posedge clk);
    end
    t_last = cyc - 1;
    in_en <= 0;
    ref_m.run(255);
    $display("reference: passes=%0d updates=%0d toggles=%0d swaps=%0d",
             ref_m.iters, ref_m.updates, ref_m.toggles, ref_m.swaps);
    while (!finish) @(posedge clk);
    t_fin = cyc;
    nout = 0;
    bad = 0;
    while (nout < N) begin
      @(posedge clk);
      if (dataout_en) begin
        if (data != ref_m.g[nout]) bad++;
        nout++;
      end
    end
    check(bad == 0, $sformatf("%0d output pixels differ", bad));
    @(posedge clk);
    check(int'(dbs_count) == N, $sformatf("dbs_count %0d", dbs_count));
    checks += N - 1;
    check(int'(iter_count) == ref_m.iters, $sformatf("passes %0d vs %0d", iter_count, ref_m.iters));
    check(int'(update_count) == ref_m.updates, $sformatf("updates %0d vs %0d", update_count, ref_m.updates));
    check(t_fin - t_last == 6 * W + 6 + 3 + ref_m.iters * N,
          $sformatf("latency %0d vs %0d", t_fin - t_last, 6 * W + 6 + 3 + ref_m.iters * N));
    $display("hardware: passes=%0d updates=%0d cycles from last pixel to finish=%0d",
             iter_count, update_count, t_fin - t_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
