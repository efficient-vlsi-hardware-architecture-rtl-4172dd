// dbs_core - the per-pixel decision and update step of quick DBS.
//
// For the pixel under test g0 = g[m0,n0] it evaluates, all at once, the
// cost change of the ten states the search considers: keeping the pixel,
// toggling it, and swapping it with each of its eight neighbours. With the
// halftone in gray units (a 1 is worth 255), a0 = +1 if g0 = 0 and -1 if
// g0 = 1, C0 = c_pp[0,0], Cd = c_pp at the neighbour's offset and c_ep the
// current error-table entries, the changes divided by 255 are
//     toggle:       255*C0 + 2*a0*c_ep[m0,n0]
//     swap with k:  510*(C0 - Cd) + 2*a0*(c_ep[m0,n0] - c_ep[k])
// (the quick-DBS cost-change formula with a1 = 0 or a1 = -a0). A swap is a
// candidate only when the neighbour is inside the image and holds the other
// value. The smallest change wins, the toggle first and then the neighbours
// in raster order on ties; it is accepted if it is negative. For an accepted
// change the core also forms the table correction
//     delta[m,n] = 255*a0*c_pp[m-m0,n-n0] + 255*a1*c_pp[m-m1,n-n1]
// on the 15x15 window centred on the pixel, each 255*x as (x<<8)-x.
//
// Interface: nb_*[r][c], r,c = 0..2 with (1,1) the pixel under test.
// choice is the position r*3+c of the swap partner, 4 for a toggle.
// upd_delta[i][j] has the pixel under test at (7,7); it is zero when nothing
// is accepted. Timing: purely combinational. The formulas follow the
// description; the tie rule and the gray-unit scaling are this design's.
module dbs_core
  import dbs_pkg::*;
#(
  localparam int unsigned UN   = MASK_N + 2,
  localparam int unsigned UR   = MASK_R + 1,
  localparam int unsigned DE_W = CEP_W + 4
) (
  input  logic       nb_g   [3][3],
  input  logic       nb_ok  [3][3],
  input  cep_t       nb_cep [3][3],
  output logic       accept,
  output logic       swap,
  output logic [3:0] choice,
  output logic signed [DE_W-1:0] best_de,
  output cep_t       upd_delta [UN][UN]
);

  typedef logic signed [DE_W-1:0] de_t;

  de_t  de   [9];
  logic cand [9];
  de_t  c0;
  de_t  e0;

  // Cost change of every candidate, in parallel.
  always_comb begin
    c0 = de_t'(cpp(0, 0));
    // 2*a0*c_ep[m0,n0]: a0 = +1 when g0 = 0.
    e0 = nb_g[1][1] ? -(de_t'(nb_cep[1][1]) <<< 1) : (de_t'(nb_cep[1][1]) <<< 1);
    for (int k = 0; k < 9; k++) begin
      automatic int r = k / 3;
      automatic int c = k % 3;
      automatic de_t cd = de_t'(cpp(r - 1, c - 1));
      automatic de_t ek = nb_g[1][1] ? -(de_t'(nb_cep[r][c]) <<< 1) : (de_t'(nb_cep[r][c]) <<< 1);
      if (k == 4) begin
        cand[k] = 1'b1;
        de[k]   = ((c0 <<< 8) - c0) + e0;
      end else begin
        cand[k] = nb_ok[r][c] && (nb_g[r][c] != nb_g[1][1]);
        de[k]   = (((c0 - cd) <<< 9) - ((c0 - cd) <<< 1)) + e0 - ek;
      end
    end
  end

  // Minimum search: toggle first, then the neighbours in raster order.
  always_comb begin
    choice  = 4'd4;
    best_de = de[4];
    for (int k = 0; k < 9; k++)
      if (k != 4 && cand[k] && de[k] < best_de) begin
        best_de = de[k];
        choice  = 4'(k);
      end
    accept = best_de < 0;
    swap   = accept && choice != 4'd4;
  end

  // Table correction on the 15x15 window around the pixel under test.
  always_comb begin
    automatic int dr = int'(choice) / 3 - 1;
    automatic int dc = int'(choice) % 3 - 1;
    for (int i = 0; i < int'(UN); i++)
      for (int j = 0; j < int'(UN); j++) begin
        automatic cep_t p0 = cep_t'(cpp(i - int'(UR), j - int'(UR)));
        automatic cep_t p1 = swap ? cep_t'(cpp(i - int'(UR) - dr, j - int'(UR) - dc)) : '0;
        automatic cep_t d0 = (p0 <<< 8) - p0;
        automatic cep_t d1 = (p1 <<< 8) - p1;
        // a0 = +1 for g0 = 0; a1 = -a0 for a swap.
        if (!accept)         upd_delta[i][j] = '0;
        else if (!nb_g[1][1]) upd_delta[i][j] = d0 - d1;
        else                 upd_delta[i][j] = d1 - d0;
      end
  end

endmodule
