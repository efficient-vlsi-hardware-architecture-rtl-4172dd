// tb_hvs_mask_conv - checks the 13x13 shift-and-add mask sum against a plain
// multiply-accumulate with the same coefficients, for random windows, for a
// single-tap impulse at every position (which reads the mask back tap by
// tap) and for the extreme error values.
module tb_hvs_mask_conv;
  import dbs_pkg::*;

  err_t win [MASK_N][MASK_N];
  cep_t cep;
  int checks = 0, failures = 0;

  hvs_mask_conv dut (.win, .cep);

  function automatic longint ref_sum();
    longint s = 0;
    for (int i = 0; i < int'(MASK_N); i++)
      for (int j = 0; j < int'(MASK_N); j++)
        s += longint'(win[i][j]) * longint'(cpp(i - 6, j - 6));
    return s;
  endfunction

  task automatic check_now(string what);
    #1;
    checks++;
    if (longint'(cep) != ref_sum()) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, cep, ref_sum());
    end
  endtask

  initial begin
    // impulses
    for (int p = 0; p < int'(MASK_N * MASK_N); p++) begin
      for (int i = 0; i < int'(MASK_N); i++)
        for (int j = 0; j < int'(MASK_N); j++)
          win[i][j] = (i * int'(MASK_N) + j == p) ? err_t'(-255) : '0;
      check_now($sformatf("impulse %0d", p));
    end
    // random windows of real error values
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < int'(MASK_N); i++)
        for (int j = 0; j < int'(MASK_N); j++)
          win[i][j] = err_t'(int'($urandom_range(0, 510)) - 255);
      check_now($sformatf("random %0d", t));
    end
    // extremes
    for (int v = 0; v < 2; v++) begin
      for (int i = 0; i < int'(MASK_N); i++)
        for (int j = 0; j < int'(MASK_N); j++)
          win[i][j] = v ? err_t'(255) : err_t'(-255);
      check_now("extreme");
    end
    // the peak coefficient is the document's 0.042274635646005 * 4096
    checks++;
    if (cpp(0, 0) != 8'd173) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
