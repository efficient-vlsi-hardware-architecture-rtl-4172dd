// err_line_buffer - raster-scan line buffer that presents a 13x13 window of
// pixel errors for the visual model error table convolution.
//
// Storage is exactly what the design description gives: twelve image-wide
// rows of 12-bit errors plus a twelve-word register for the current row,
// 12*IMG_W + 12 words in all (3,084 for a 256-pixel line), instead of a
// whole error image. Folded into rows of IMG_W, these words are the twelve
// previous image lines and the start of the current one; the thirteenth
// (newest) value of the window is the incoming error itself, which is used
// directly, so the bottom register needs only twelve words. On every push all
// words move one place along the raster order: the window slides one pixel to
// the right, at the end of a line it continues on the next one, and the
// oldest word leaves the buffer. Here the folded rows are written as one
// delay line; window tap (r,c) is the word pushed (12-r)*IMG_W + (12-c)
// pixels before the incoming one.
//
// Interface: push/din enter one error in raster order. win[r][c] is the
// window with the incoming value din at win[12][12], r = 0 the oldest row,
// c = 12 the newest column; it is valid while din is presented, so the mask
// sum can be taken in the same cycle. Columns that wrap from the previous
// line and rows above the image hold stale data: the caller masks them.
// Timing: win is combinational from din and the stored words; the words
// shift at the clock edge when push is high. Nothing is reset.
module err_line_buffer
  import dbs_pkg::*;
#(
  parameter int unsigned IMG_W = 256
) (
  input  logic clk,
  input  logic push,
  input  err_t din,
  output err_t win [MASK_N][MASK_N]
);

  localparam int unsigned ROWS = MASK_N - 1;
  localparam int unsigned LEN  = ROWS * IMG_W + ROWS;

  err_t sr [LEN];   // sr[0]: the value pushed last

  always_comb begin
    for (int r = 0; r < int'(MASK_N); r++)
      for (int c = 0; c < int'(MASK_N); c++) begin
        automatic int d = (int'(ROWS) - r) * int'(IMG_W) + (int'(ROWS) - c);
        win[r][c] = (d == 0) ? din : sr[d-1];
      end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      sr[0] <= din;
      for (int i = 1; i < int'(LEN); i++) sr[i] <= sr[i-1];
    end
  end

endmodule
