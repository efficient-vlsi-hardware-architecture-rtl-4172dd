// tb_dbs_core - drives random 3x3 neighbourhoods (halftone bits, inside
// flags as at interior, edge and corner pixels, and error-table values)
// into the decision unit and compares the chosen move, its cost change and
// the 15x15 table correction with values computed from the unscaled
// cost-change formula (halftone in gray units, a0 = +-255).
module tb_dbs_core;
  import dbs_pkg::*;

  localparam int UN = 15;

  logic nb_g [3][3];
  logic nb_ok [3][3];
  cep_t nb_cep [3][3];
  logic accept, swap;
  logic [3:0] choice;
  logic signed [CEP_W+3:0] best_de;
  cep_t upd_delta [UN][UN];
  int checks = 0, failures = 0;
  int n_acc_t = 0, n_acc_s = 0, n_rej = 0;

  dbs_core dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint a0, best, d;
      int bk, sc, dr, dc;
      sc = (t % 4 == 0) ? 60000 : 300;   // error scale: sometimes large, sometimes near the threshold
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          nb_g[r][c] = $urandom_range(0, 1);
          nb_cep[r][c] = cep_t'(int'($urandom_range(0, 2 * sc)) - sc);
          nb_ok[r][c] = 1;
        end
      // emulate image borders
      if (t % 5 == 1) for (int c = 0; c < 3; c++) nb_ok[0][c] = 0;
      if (t % 5 == 2) for (int r = 0; r < 3; r++) begin nb_ok[r][2] = 0; nb_ok[2][r] = 0; end
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          if (!nb_ok[r][c]) begin nb_g[r][c] = 0; nb_cep[r][c] = '0; end
      #1;
      a0 = nb_g[1][1] ? -255 : 255;
      best = a0 * a0 * 173 + 2 * a0 * longint'(nb_cep[1][1]);
      bk = 4;
      for (int k = 0; k < 9; k++) begin
        int r, c;
        r = k / 3;
        c = k % 3;
        if (k != 4 && nb_ok[r][c] && nb_g[r][c] != nb_g[1][1]) begin
          d = 2 * a0 * a0 * 173 - 2 * a0 * a0 * longint'(cpp(r - 1, c - 1))
              + 2 * a0 * longint'(nb_cep[1][1]) - 2 * a0 * longint'(nb_cep[r][c]);
          if (d < best) begin best = d; bk = k; end
        end
      end
      check(longint'(best_de) * 255 == best, $sformatf("t%0d cost %0d*255 vs %0d", t, best_de, best));
      check(accept == (best < 0), $sformatf("t%0d accept", t));
      check(int'(choice) == bk, $sformatf("t%0d choice %0d vs %0d", t, choice, bk));
      check(swap == (best < 0 && bk != 4), $sformatf("t%0d swap", t));
      if (best >= 0) n_rej++;
      else if (bk == 4) n_acc_t++;
      else n_acc_s++;
      dr = bk / 3 - 1;
      dc = bk % 3 - 1;
      for (int i = 0; i < UN; i++)
        for (int j = 0; j < UN; j++) begin
          longint e;
          e = 0;
          if (best < 0) begin
            e = a0 * longint'(cpp(i - 7, j - 7));
            if (bk != 4) e -= a0 * longint'(cpp(i - 7 - dr, j - 7 - dc));
          end
          check(longint'(upd_delta[i][j]) == e, $sformatf("t%0d delta %0d %0d", t, i, j));
        end
    end
    check(n_acc_t > 0 && n_acc_s > 0 && n_rej > 0, "toggle, swap and no-change all seen");
    $display("toggles=%0d swaps=%0d unchanged=%0d", n_acc_t, n_acc_s, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
