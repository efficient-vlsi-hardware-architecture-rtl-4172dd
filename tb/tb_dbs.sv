// tb_dbs - end-to-end test of the DBS engine at a reduced image size.
//
// Sends two images through the top level (the second one after finish,
// without a reset), with random gaps in in_en, and compares for each the
// streamed halftone, the pass count and the update count with the software
// reference in dbs_ref_pkg. It also checks the cycle count from the last
// input pixel to finish (table flush, then one clock per pixel per pass) and
// that the output stream is unbroken. The mechanisms the design relies on are
// counted and each must occur: input gaps, the builder's flush, accepted
// toggles, accepted swaps, more than one pass, and swap candidates cut off at
// the image border.
module tb_dbs;
  import dbs_pkg::*;
  import dbs_ref_pkg::*;

  localparam int W = 32;
  localparam int H = 24;
  localparam int N = W * H;
  localparam int FLUSH = 6 * W + 6;

  logic clk = 0, reset = 0;
  logic [8:0] rb_Q = '0;
  logic in_en = 0;
  logic finish, dataout_en, data;
  logic [7:0] iter_count;
  logic [31:0] update_count;
  logic [$clog2(N):0] dbs_count;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_gap = 0, n_flush = 0, n_tog = 0, n_swp = 0, n_multi = 0, n_border = 0;

  dbs #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters.
  always @(posedge clk) if (reset) begin
    if (dut.u_bld.phase == 2'd1) n_flush++;
    if (dut.upd_en && !dut.swap) n_tog++;
    if (dut.upd_en && dut.swap) n_swp++;
    if (dut.state == 2'd1 && (!dut.nb_ok[0][0] || !dut.nb_ok[2][2])) n_border++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_image(int seed_kind);
    dbs_ref ref_m = new(W, H);
    bit out [] = new[N];
    int nout = 0, t_last = 0, t_fin = 0, first_out = -1, last_out = -1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        // gray ramp across the image plus noise; random initial halftone
        int v = (seed_kind == 0) ? (x * 255) / (W - 1) : (y * 255) / (H - 1);
        v += int'($urandom_range(0, 40)) - 20;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        ref_m.f[y*W + x] = v;
        ref_m.g[y*W + x] = $urandom_range(0, 1);
      end
    // drive pixels with random gaps
    for (int p = 0; p < N; p++) begin
      while ($urandom_range(0, 4) == 0) begin
        in_en <= 0;
        n_gap++;
        @(posedge clk);
      end
      in_en <= 1;
      rb_Q  <= {ref_m.g[p], 8'(ref_m.f[p])};
      @(posedge clk);
    end
    t_last = cyc - 1;
    in_en <= 0;
    ref_m.run(255);
    // wait for finish, collect the stream
    while (!finish) @(posedge clk);
    t_fin = cyc;
    while (nout < N) begin
      @(posedge clk);
      if (dataout_en) begin
        out[nout] = data;
        if (first_out < 0) first_out = cyc;
        last_out = cyc;
        nout++;
      end
    end
    repeat (3) @(posedge clk);
    check(!dataout_en, "dataout_en falls after the image");
    check(int'(dbs_count) == N, $sformatf("dbs_count %0d", dbs_count));
    check(last_out - first_out == N - 1, "output stream unbroken");
    for (int p = 0; p < N; p++)
      check(out[p] == ref_m.g[p], $sformatf("pixel %0d", p));
    check(int'(iter_count) == ref_m.iters, $sformatf("passes %0d vs %0d", iter_count, ref_m.iters));
    check(int'(update_count) == ref_m.updates, $sformatf("updates %0d vs %0d", update_count, ref_m.updates));
    // finish is set FLUSH + 1 + passes*N edges after the edge that takes the
    // last pixel; t_last is taken one edge early and this loop sees finish
    // one edge late.
    check(t_fin - t_last == FLUSH + 3 + ref_m.iters * N,
          $sformatf("latency %0d vs %0d", t_fin - t_last, FLUSH + 3 + ref_m.iters * N));
    if (ref_m.iters > 1) n_multi++;
    $display("image %0d: passes=%0d updates=%0d toggles=%0d swaps=%0d", seed_kind,
             ref_m.iters, ref_m.updates, ref_m.toggles, ref_m.swaps);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset <= 1;
    @(posedge clk);
    run_image(0);
    check(finish, "finish held after output");
    run_image(1);
    check(n_gap > 0, "input gaps");
    check(n_flush == 2 * FLUSH, $sformatf("flush cycles %0d", n_flush));
    check(n_tog > 0, "accepted toggles");
    check(n_swp > 0, "accepted swaps");
    check(n_multi > 0, "more than one pass");
    check(n_border > 0, "border pixels");
    $display("mechanisms: gaps=%0d flush=%0d toggles=%0d swaps=%0d multipass=%0d border=%0d",
             n_gap, n_flush, n_tog, n_swp, n_multi, n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
