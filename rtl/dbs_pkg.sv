// dbs_pkg - constants shared by the Direct Binary Search (DBS) halftoning engine.
//
// Holds the word widths of the datapath and the human-visual-system (HVS)
// autocorrelation mask c_pp[m,n] in fixed point. The mask is 13x13 and its
// real-valued coefficients are scaled by 2^12 and truncated to integers
// ("level shift"), so every multiplication by a coefficient becomes a small
// sum of shifted copies. The 13x13 size, the 12-bit shift and the peak value
// 0.042274635646005 (173 after scaling) follow the design description.
//
// The coefficients themselves are this design's own choice: a circular
// Gaussian autocorrelation
//     c_pp[m,n] = floor( 4096 * 0.042274635646005 * exp(-(m^2+n^2)/6) )
// for |m|,|n| <= 6. It has the specified peak and leaves 72 of the 169 mask
// positions at zero after truncation. Any other symmetric mask can be dropped
// into CPP_Q below (quadrant |m|,|n| = 0..6); the rest of the design reads
// the mask only through cpp().
package dbs_pkg;

  // Mask geometry: 13x13, radius 6.
  localparam int unsigned MASK_R = 6;
  localparam int unsigned MASK_N = 2 * MASK_R + 1;

  // Fixed-point widths.
  localparam int unsigned CPP_SHIFT = 12;  // mask scaled by 2^CPP_SHIFT
  localparam int unsigned CPP_W     = 8;   // unsigned mask coefficient width
  localparam int unsigned ERR_W     = 12;  // signed error e = 255*g - f in the line buffer
  localparam int unsigned CEP_W     = 25;  // signed c_ep table entry

  // Range of one mask quadrant, |m| and |n| from 0 to MASK_R.
  typedef logic [CPP_W-1:0] cpp_t;
  typedef logic signed [ERR_W-1:0] err_t;
  typedef logic signed [CEP_W-1:0] cep_t;

  localparam cpp_t CPP_Q [MASK_R+1][MASK_R+1] = '{
    '{8'd173, 8'd146, 8'd88, 8'd38, 8'd12, 8'd2, 8'd0},
    '{8'd146, 8'd124, 8'd75, 8'd32, 8'd10, 8'd2, 8'd0},
    '{8'd88,  8'd75,  8'd45, 8'd19, 8'd6,  8'd1, 8'd0},
    '{8'd38,  8'd32,  8'd19, 8'd8,  8'd2,  8'd0, 8'd0},
    '{8'd12,  8'd10,  8'd6,  8'd2,  8'd0,  8'd0, 8'd0},
    '{8'd2,   8'd2,   8'd1,  8'd0,  8'd0,  8'd0, 8'd0},
    '{8'd0,   8'd0,   8'd0,  8'd0,  8'd0,  8'd0, 8'd0}
  };

  // Mask coefficient at offset (dm, dn); zero outside the 13x13 support.
  function automatic cpp_t cpp(input int dm, input int dn);
    int am, an;
    am = (dm < 0) ? -dm : dm;
    an = (dn < 0) ? -dn : dn;
    if (am > int'(MASK_R) || an > int'(MASK_R)) return '0;
    return CPP_Q[am][an];
  endfunction

  // Multiplies a signed value by an unsigned constant coefficient as a sum of
  // left-shifted copies, one per set bit: the shift-and-add replacement of a
  // multiplier. With a constant coefficient every test below is static.
  function automatic cep_t shift_mult(input err_t x, input cpp_t c);
    cep_t acc;
    acc = '0;
    for (int b = 0; b < int'(CPP_W); b++)
      if (c[b]) acc += cep_t'(x) <<< b;
    return acc;
  endfunction

endpackage
