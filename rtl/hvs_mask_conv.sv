// hvs_mask_conv - one output of the 13x13 convolution c_ep = e ** c_pp.
//
// Takes a 13x13 window of signed pixel errors e = 255*g - f and returns the
// sum over the window of e[i][j] * c_pp[i-6][j-6], i.e. the visual model
// error table entry of the window's centre pixel. All 169 taps are evaluated
// in parallel in one combinational pass, as the design description asks.
// The mask is the 12-bit-shifted integer table of dbs_pkg; each tap is
// formed by shift-and-add (dbs_pkg::shift_mult) instead of a multiplier, and
// taps whose coefficient truncated to zero cost nothing.
//
// Interface: win[row][col], row 0 the oldest (top) image row, col 0 the
// leftmost column; taps outside the image must be zeroed by the caller.
// Timing: purely combinational.
module hvs_mask_conv
  import dbs_pkg::*;
(
  input  err_t win [MASK_N][MASK_N],
  output cep_t cep
);

  always_comb begin
    cep = '0;
    for (int i = 0; i < int'(MASK_N); i++)
      for (int j = 0; j < int'(MASK_N); j++)
        cep += shift_mult(win[i][j], cpp(i - int'(MASK_R), j - int'(MASK_R)));
  end

endmodule
