// dbs - Direct Binary Search (DBS) halftoning engine, top level.
//
// Turns a gray image plus an initial halftone into the halftone that
// minimises the perceived (HVS-filtered) error, by the quick DBS method:
//   1. Load and table build. Pixels arrive on rb_Q while in_en is high, in
//      raster order: bit 8 is the initial halftone bit, bits 7:0 the gray
//      level. The halftone bit goes to g_mem; the error 255*g - f goes
//      through the line buffer of cep_builder, which writes the visual model
//      error table c_ep into fcep_mem. After the last pixel the builder
//      flushes 6*IMG_W+6 cycles on its own.
//   2. Iterations. Every pixel is visited in raster order, one pixel per
//      clock: dbs_core evaluates toggle and the eight swaps in parallel and,
//      if the best one lowers the cost, g_mem and the 15x15 window of
//      fcep_mem are updated at the same clock edge, so the next pixel already
//      sees the new values. A pass in which nothing changed ends the search.
//   3. Output. finish rises and stays high; the halftone is streamed out in
//      raster order on data, qualified by dataout_en, one pixel per clock.
// A new image may be sent once the output stream has ended (in_en is ignored
// before that); its first pixel clears finish.
//
// Interface (pins as described, plus status counters):
//   clk posedge, reset active low (asynchronous), rb_Q[8:0] {g, f}, in_en,
//   finish, dataout_en, data; iter_count counts passes including the last
//   one without changes, update_count counts accepted toggles and swaps,
//   dbs_count counts the output pixels sent so far (reaches IMG_W*IMG_H).
// Timing: the table is complete 6*IMG_W + 6 clock edges after the edge that
// takes the last pixel and the first pass starts one edge later; each pass
// takes IMG_W*IMG_H cycles; finish is set at the edge ending the last pass,
// 6*IMG_W + 7 + passes*IMG_W*IMG_H edges after the last pixel; the
// IMG_W*IMG_H output bits follow on consecutive cycles. The flow and the one-pixel-per-clock parallel update follow the
// description; the handshake details and status counters are this design's.
module dbs
  import dbs_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  localparam int unsigned NPIX = IMG_W * IMG_H,
  localparam int unsigned AW   = $clog2(NPIX),
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H)
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [8:0]  rb_Q,
  input  logic        in_en,
  output logic        finish,
  output logic        dataout_en,
  output logic        data,
  output logic [7:0]  iter_count,
  output logic [31:0] update_count,
  output logic [AW:0] dbs_count
);

  typedef enum logic [1:0] {S_LOAD, S_ITER, S_OUT, S_DONE} state_t;

  localparam int unsigned UN = MASK_N + 2;

  state_t          state;
  logic [YW-1:0]   prow;
  logic [XW-1:0]   pcol;
  logic            changed;
  logic [AW-1:0]   oaddr;

  // Builder
  logic            bld_clear, bld_valid, bld_ready, bld_done;
  logic [AW-1:0]   bld_ld_addr, bld_wr_addr;
  logic            bld_wr_en;
  cep_t            bld_wr_data;

  // Core and memories
  logic            nb_g   [3][3];
  logic            nb_ok  [3][3];
  cep_t            nb_cep [3][3];
  logic            accept, swap, upd_en;
  logic [3:0]      choice;
  logic signed [CEP_W+3:0] best_de;
  cep_t            upd_delta [UN][UN];
  logic            g_ld_en;
  logic            out_bit;

  assign bld_valid = in_en && (state == S_LOAD || state == S_DONE);
  assign g_ld_en   = bld_valid && bld_ready;
  assign upd_en    = (state == S_ITER) && accept;

  cep_builder #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_bld (
    .clk, .rst_n(reset), .clear(bld_clear),
    .in_valid(bld_valid), .in_g(rb_Q[8]), .in_f(rb_Q[7:0]),
    .in_ready(bld_ready), .ld_addr(bld_ld_addr),
    .wr_en(bld_wr_en), .wr_addr(bld_wr_addr), .wr_data(bld_wr_data),
    .done(bld_done)
  );

  g_mem #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_g (
    .clk,
    .ld_en(g_ld_en), .ld_addr(bld_ld_addr), .ld_data(rb_Q[8]),
    .nb_row(prow), .nb_col(pcol), .nb_g, .nb_ok,
    .upd_en, .upd_swap(swap), .upd_nb(choice),
    .rd_addr(oaddr), .rd_data(out_bit)
  );

  fcep_mem #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_cep (
    .clk,
    .wr_en(bld_wr_en), .wr_addr(bld_wr_addr), .wr_data(bld_wr_data),
    .nb_row(prow), .nb_col(pcol), .nb_cep,
    .upd_en, .upd_delta
  );

  dbs_core u_core (
    .nb_g, .nb_ok, .nb_cep,
    .accept, .swap, .choice, .best_de, .upd_delta
  );

  // A new image restarts the builder once the previous result has left.
  assign bld_clear = (state == S_OUT) && oaddr == AW'(NPIX - 1);

  always_ff @(posedge clk or negedge reset) begin
    if (!reset) begin
      state        <= S_LOAD;
      prow         <= '0;
      pcol         <= '0;
      changed      <= 1'b0;
      oaddr        <= '0;
      finish       <= 1'b0;
      dataout_en   <= 1'b0;
      data         <= 1'b0;
      iter_count   <= '0;
      update_count <= '0;
      dbs_count    <= '0;
    end else begin
      dataout_en <= 1'b0;
      case (state)
        S_LOAD: begin
          if (bld_done) begin
            state        <= S_ITER;
            prow         <= '0;
            pcol         <= '0;
            changed      <= 1'b0;
            iter_count   <= '0;
            update_count <= '0;
            dbs_count    <= '0;
          end
        end
        S_ITER: begin
          if (accept) update_count <= update_count + 1;
          if (pcol == XW'(IMG_W - 1)) begin
            pcol <= '0;
            if (prow == YW'(IMG_H - 1)) begin
              prow       <= '0;
              iter_count <= iter_count + 1'b1;
              if (!(changed || accept)) begin
                state  <= S_OUT;
                oaddr  <= '0;
                finish <= 1'b1;
              end
            end else begin
              prow <= prow + 1'b1;
            end
          end else begin
            pcol <= pcol + 1'b1;
          end
          if (accept) changed <= 1'b1;
          if (pcol == XW'(IMG_W - 1) && prow == YW'(IMG_H - 1)) changed <= 1'b0;
        end
        S_OUT: begin
          dataout_en <= 1'b1;
          data       <= out_bit;
          dbs_count  <= dbs_count + 1'b1;
          oaddr      <= oaddr + 1'b1;
          if (oaddr == AW'(NPIX - 1)) state <= S_DONE;
        end
        S_DONE: begin
          if (in_en) begin
            state  <= S_LOAD;
            finish <= 1'b0;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // The core must never pick a swap partner outside the image.
  assert property (@(posedge clk) disable iff (!reset)
    upd_en && swap |-> nb_ok[choice / 3][choice % 3]);

endmodule
