// cep_builder - builds the visual model error table c_ep = e ** c_pp while
// the image streams in (first stage of quick DBS).
//
// Each input pixel carries the initial halftone bit g and the gray level f.
// Its error e = 255*g - f (gray units, so a halftone 1 is worth 255) is
// pushed into err_line_buffer; the gray image itself is never stored. In the
// same cycle the window, made of the buffered errors and the incoming one, is
// summed by hvs_mask_conv: once its centre pixel, 6 rows and 6 columns behind
// the incoming one, lies inside the image, the sum is that pixel's table
// entry and is written to the f_Cep memory. Taps that fall outside the image count as zero errors
// (zero padding). After the last of the IMG_W*IMG_H pixels the builder pushes
// 6*IMG_W+6 zero errors on its own, one per cycle, to bring the last rows of
// the table out, then raises done.
//
// Interface: in_valid/in_g/in_f deliver pixels in raster order; they are
// accepted while in_ready is high (load phase), and ld_addr is the raster
// address of the pixel accepted in that cycle. wr_en/wr_addr/wr_data is the
// table write port. clear (one cycle) restarts the builder for a new image.
// Timing: one pixel per cycle when in_valid stays high; the entry of a pixel
// is written in the cycle of the push 6*IMG_W+6 pushes after it; done rises
// at the edge of the last write, IMG_W*IMG_H + 6*IMG_W + 6 cycles after the
// first pixel at full rate. The line buffer, the flush and the zero padding are the
// described mechanism; the padding rule and the handshake are this design's.
module cep_builder
  import dbs_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  logic in_g,
  input  logic [7:0] in_f,
  output logic in_ready,
  output logic [$clog2(IMG_W*IMG_H)-1:0] ld_addr,
  output logic wr_en,
  output logic [$clog2(IMG_W*IMG_H)-1:0] wr_addr,
  output cep_t wr_data,
  output logic done
);

  localparam int unsigned NPIX  = IMG_W * IMG_H;
  localparam int unsigned AW    = $clog2(NPIX);
  localparam int unsigned FLUSH = MASK_R * IMG_W + MASK_R;
  localparam int unsigned TOTAL = NPIX + FLUSH;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  typedef enum logic [1:0] {PH_LOAD, PH_FLUSH, PH_DONE} phase_t;

  phase_t          phase;
  logic [CW-1:0]   npush;     // pushes so far
  int              pr, pc;    // image position of the value being pushed
  logic            push;
  err_t            din;
  err_t            win  [MASK_N][MASK_N];
  err_t            mwin [MASK_N][MASK_N];
  int              cr, cc;    // centre of the window

  assign in_ready = (phase == PH_LOAD);
  assign ld_addr  = AW'(npush);
  assign push     = (phase == PH_LOAD && in_valid) || phase == PH_FLUSH;
  assign din      = (phase == PH_LOAD) ? err_t'(in_g ? 255 : 0) - err_t'({1'b0, in_f}) : '0;
  assign done     = (phase == PH_DONE);

  err_line_buffer #(.IMG_W(IMG_W)) u_lb (.clk, .push, .din, .win);

  // Centre position and zero padding of taps outside the image.
  always_comb begin
    cr = pr - int'(MASK_R);
    cc = pc - int'(MASK_R);
    if (cc < 0) begin
      cc += int'(IMG_W);
      cr -= 1;
    end
    for (int i = 0; i < int'(MASK_N); i++)
      for (int j = 0; j < int'(MASK_N); j++) begin
        automatic int r = cr - int'(MASK_R) + i;
        automatic int c = cc - int'(MASK_R) + j;
        mwin[i][j] = (r >= 0 && r < int'(IMG_H) && c >= 0 && c < int'(IMG_W)) ? win[i][j] : '0;
      end
  end

  hvs_mask_conv u_conv (.win(mwin), .cep(wr_data));

  assign wr_en   = push && cr >= 0 && cr < int'(IMG_H);
  assign wr_addr = AW'(cr * int'(IMG_W) + cc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_LOAD;
      npush <= '0;
      pr    <= 0;
      pc    <= 0;
    end else if (clear) begin
      phase <= PH_LOAD;
      npush <= '0;
      pr    <= 0;
      pc    <= 0;
    end else begin
      if (push) begin
        npush <= npush + 1'b1;
        if (pc == int'(IMG_W) - 1) begin
          pc <= 0;
          pr <= pr + 1;
        end else begin
          pc <= pc + 1;
        end
      end
      case (phase)
        PH_LOAD:  if (push && npush == CW'(NPIX - 1))  phase <= PH_FLUSH;
        PH_FLUSH: if (npush == CW'(TOTAL - 1))         phase <= PH_DONE;
        default:  ;
      endcase
    end
  end

endmodule
