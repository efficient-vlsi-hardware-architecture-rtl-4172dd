// tb_fcep_mem - writes a random table into a 20x18 f_Cep memory through the
// build port, applies random 15x15 correction windows at random centres
// (including the corners, where most of the window falls outside), and
// after each step compares every 3x3 neighbourhood read with a software
// copy; entries outside the image must read as zero.
module tb_fcep_mem;
  import dbs_pkg::*;

  localparam int W = 20;
  localparam int H = 18;
  localparam int N = W * H;
  localparam int UN = 15;

  logic clk = 0;
  logic wr_en = 0;
  logic [$clog2(N)-1:0] wr_addr = '0;
  cep_t wr_data = '0;
  logic [$clog2(H)-1:0] nb_row = '0;
  logic [$clog2(W)-1:0] nb_col = '0;
  cep_t nb_cep [3][3];
  logic upd_en = 0;
  cep_t upd_delta [UN][UN];
  longint model [N];
  int checks = 0, failures = 0;

  fcep_mem #(.IMG_W(W), .IMG_H(H)) dut (.*);

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
        #1;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            int yy = y + r - 1, xx = x + c - 1;
            bit in = yy >= 0 && yy < H && xx >= 0 && xx < W;
            check(longint'(nb_cep[r][c]) == (in ? model[yy*W + xx] : 0),
                  $sformatf("nb (%0d,%0d)+%0d%0d", y, x, r, c));
          end
      end
  endtask

  initial begin
    for (int p = 0; p < N; p++) begin
      model[p] = longint'($urandom_range(0, 2000000)) - 1000000;
      wr_en <= 1;
      wr_addr <= p;
      wr_data <= cep_t'(model[p]);
      @(posedge clk);
    end
    wr_en <= 0;
    @(posedge clk);
    compare_all();
    for (int t = 0; t < 30; t++) begin
      int y, x;
      y = (t == 0) ? 0 : (t == 1) ? H - 1 : $urandom_range(0, H - 1);
      x = (t == 0) ? 0 : (t == 1) ? W - 1 : $urandom_range(0, W - 1);
      @(negedge clk);
      nb_row = y;
      nb_col = x;
      for (int i = 0; i < UN; i++)
        for (int j = 0; j < UN; j++)
          upd_delta[i][j] = cep_t'(int'($urandom_range(0, 100000)) - 50000);
      upd_en = 1;
      @(posedge clk);
      #1;
      upd_en = 0;
      for (int i = 0; i < UN; i++)
        for (int j = 0; j < UN; j++)
          if (y + i - 7 >= 0 && y + i - 7 < H && x + j - 7 >= 0 && x + j - 7 < W)
            model[(y + i - 7)*W + x + j - 7] += longint'(upd_delta[i][j]);
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
