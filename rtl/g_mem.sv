// g_mem - halftone image memory "g", one bit per pixel.
//
// Holds the IMG_W x IMG_H binary halftone in raster order. It has the ports
// the DBS flow needs in the same cycle: a load write port for the initial
// halftone, a 3x3 neighbourhood read around the pixel under test (with a flag
// per position telling whether it lies inside the image), an update port that
// flips the pixel under test and, for a swap, one of its eight neighbours, and
// a single-bit read port for streaming the result out. The memory is written
// as a flip-flop array so that the neighbourhood read and the two-pixel
// update happen in one clock; the port set is this design's choice, the
// 1-bit-per-pixel storage follows the description.
//
// Interface: nb_row/nb_col is the centre of the neighbourhood; nb_g[r][c]
// and nb_ok[r][c] use r,c = 0..2 with (1,1) the centre; outside the image
// nb_g reads 0. upd_en flips the centre; upd_swap also flips the neighbour
// at position upd_nb (r*3+c). Timing: reads are combinational, writes take
// effect at the clock edge. Contents are not reset.
module g_mem #(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  localparam int unsigned AW = $clog2(IMG_W * IMG_H),
  localparam int unsigned XW = $clog2(IMG_W),
  localparam int unsigned YW = $clog2(IMG_H)
) (
  input  logic          clk,
  // load port
  input  logic          ld_en,
  input  logic [AW-1:0] ld_addr,
  input  logic          ld_data,
  // neighbourhood read
  input  logic [YW-1:0] nb_row,
  input  logic [XW-1:0] nb_col,
  output logic          nb_g  [3][3],
  output logic          nb_ok [3][3],
  // update
  input  logic          upd_en,
  input  logic          upd_swap,
  input  logic [3:0]    upd_nb,
  // streaming read
  input  logic [AW-1:0] rd_addr,
  output logic          rd_data
);

  logic mem [IMG_W * IMG_H];

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        automatic int y = int'(nb_row) + r - 1;
        automatic int x = int'(nb_col) + c - 1;
        nb_ok[r][c] = (y >= 0 && y < int'(IMG_H) && x >= 0 && x < int'(IMG_W));
        nb_g[r][c]  = nb_ok[r][c] ? mem[AW'(y * int'(IMG_W) + x)] : 1'b0;
      end
  end

  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (ld_en) mem[ld_addr] <= ld_data;
    if (upd_en) begin
      automatic int y0 = int'(nb_row);
      automatic int x0 = int'(nb_col);
      automatic int y1 = y0 + int'(upd_nb) / 3 - 1;
      automatic int x1 = x0 + int'(upd_nb) % 3 - 1;
      mem[AW'(y0 * int'(IMG_W) + x0)] <= ~mem[AW'(y0 * int'(IMG_W) + x0)];
      if (upd_swap)
        mem[AW'(y1 * int'(IMG_W) + x1)] <= ~mem[AW'(y1 * int'(IMG_W) + x1)];
    end
  end

endmodule
