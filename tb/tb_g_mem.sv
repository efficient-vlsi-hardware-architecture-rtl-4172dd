// tb_g_mem - loads a random 8x6 halftone, then applies random toggles and
// swaps through the update port and after each step compares every 3x3
// neighbourhood (values and inside-image flags) and the streaming read port
// with a software copy of the image.
module tb_g_mem;
  localparam int W = 8;
  localparam int H = 6;
  localparam int N = W * H;

  logic clk = 0;
  logic ld_en = 0, ld_data = 0;
  logic [$clog2(N)-1:0] ld_addr = '0, rd_addr = '0;
  logic [$clog2(H)-1:0] nb_row = '0;
  logic [$clog2(W)-1:0] nb_col = '0;
  logic nb_g [3][3];
  logic nb_ok [3][3];
  logic upd_en = 0, upd_swap = 0;
  logic [3:0] upd_nb = '0;
  logic rd_data;
  bit model [N];
  int checks = 0, failures = 0;

  g_mem #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic compare_all();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        nb_row = y;
        nb_col = x;
        rd_addr = y * W + x;
        #1;
        check(rd_data == model[y*W + x], "read port");
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            int yy = y + r - 1, xx = x + c - 1;
            bit in = yy >= 0 && yy < H && xx >= 0 && xx < W;
            check(nb_ok[r][c] == in, "inside flag");
            check(nb_g[r][c] == (in ? model[yy*W + xx] : 1'b0), $sformatf("nb (%0d,%0d)+%0d%0d", y, x, r, c));
          end
      end
  endtask

  initial begin
    for (int p = 0; p < N; p++) begin
      model[p] = $urandom_range(0, 1);
      ld_en <= 1;
      ld_addr <= p;
      ld_data <= model[p];
      @(posedge clk);
    end
    ld_en <= 0;
    @(posedge clk);
    compare_all();
    for (int t = 0; t < 40; t++) begin
      int y, x, k;
      y = $urandom_range(0, H - 1);
      x = $urandom_range(0, W - 1);
      do k = $urandom_range(0, 8);
      while (k == 4 || y + k / 3 - 1 < 0 || y + k / 3 - 1 >= H || x + k % 3 - 1 < 0 || x + k % 3 - 1 >= W);
      @(negedge clk);
      nb_row = y;
      nb_col = x;
      upd_en = 1;
      upd_swap = t % 2;
      upd_nb = 4'(k);
      @(posedge clk);
      #1;
      upd_en = 0;
      model[y*W + x] = !model[y*W + x];
      if (t % 2) model[(y + k / 3 - 1)*W + x + k % 3 - 1] = !model[(y + k / 3 - 1)*W + x + k % 3 - 1];
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
