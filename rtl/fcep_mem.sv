// fcep_mem - the f_Cep memory: visual model error table c_ep, one 25-bit
// signed word per pixel.
//
// The table is written once, entry by entry, by the table builder; after
// that the DBS core reads the 3x3 entries around the pixel under test and,
// when it accepts a toggle or swap, adds a 15x15 window of corrections
// centred on that pixel (the 13x13 mask around the pixel plus the 13x13 mask
// around a swap partner at most one pixel away) in the same clock. Entries
// outside the image are neither read (they return 0) nor written. The
// memory is a flip-flop array so that this whole-window update finishes in
// one cycle, as the parallel update of the description requires; the name
// f_Cep and the 25-bit word follow the description, the port set is this
// design's choice.
//
// Interface: wr_* is the build write port. nb_row/nb_col select the centre of
// the 3x3 read nb_cep[r][c] (r,c = 0..2, centre (1,1)) and of the update
// window upd_delta[i][j] (i,j = 0..14, centre (7,7)), applied when upd_en is
// high. Timing: reads are combinational, writes happen at the clock edge.
// Contents are not reset.
module fcep_mem
  import dbs_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  localparam int unsigned AW = $clog2(IMG_W * IMG_H),
  localparam int unsigned XW = $clog2(IMG_W),
  localparam int unsigned YW = $clog2(IMG_H),
  localparam int unsigned UN = MASK_N + 2,
  localparam int unsigned UR = MASK_R + 1
) (
  input  logic          clk,
  // build write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  cep_t          wr_data,
  // neighbourhood read and window update
  input  logic [YW-1:0] nb_row,
  input  logic [XW-1:0] nb_col,
  output cep_t          nb_cep [3][3],
  input  logic          upd_en,
  input  cep_t          upd_delta [UN][UN]
);

  cep_t mem [IMG_W * IMG_H];

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        automatic int y = int'(nb_row) + r - 1;
        automatic int x = int'(nb_col) + c - 1;
        nb_cep[r][c] = (y >= 0 && y < int'(IMG_H) && x >= 0 && x < int'(IMG_W))
                       ? mem[AW'(y * int'(IMG_W) + x)] : '0;
      end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (upd_en) begin
      for (int i = 0; i < int'(UN); i++)
        for (int j = 0; j < int'(UN); j++) begin
          automatic int y = int'(nb_row) + i - int'(UR);
          automatic int x = int'(nb_col) + j - int'(UR);
          if (y >= 0 && y < int'(IMG_H) && x >= 0 && x < int'(IMG_W))
            mem[AW'(y * int'(IMG_W) + x)] <= mem[AW'(y * int'(IMG_W) + x)] + upd_delta[i][j];
        end
    end
  end

endmodule
