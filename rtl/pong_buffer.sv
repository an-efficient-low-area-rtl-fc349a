// pong_buffer: holds the row or column the 1-D DCT core is transforming.
//
// A 96-bit register run by a four-state FSM:
//   ONED_EMPTY (parallel-in):  MuxSel = 0; a row of pixels is loaded from the
//       ping buffer when writeEn is high, then -> ONED_FULL.
//   ONED_FULL (computation):   the row is offered to the 1-D DCT core for
//       eight accepted reads, one coefficient each.  After the eighth read it
//       goes to TWOD_EMPTY if this was the eighth row, else to ONED_EMPTY.
//   TWOD_EMPTY (parallel-in):  as ONED_EMPTY but MuxSel = 1, so a column of
//       1-D coefficients is loaded from the transpose buffer.
//   TWOD_FULL (computation):   as ONED_FULL; after the eighth column it
//       returns to ONED_EMPTY, otherwise to TWOD_EMPTY.
// In the *_EMPTY states full = 0 and empty = 1; in the *_FULL states full = 1
// and empty = 0.  Handshakes are FIFO-like (see ping_buffer).  Without stalls
// one row or column takes 9 cycles, so an 8x8 block occupies the buffer for
// 2 x 72 = 144 cycles.  The FSM is the published one; counting accepted reads
// (rather than raw cycles) makes it stall with the downstream pipeline, and
// the reset state ONED_EMPTY is this design's choice.
module pong_buffer
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // input side (from src_mux)
  input  row_t  writeData,
  input  logic  writeEn,
  output logic  full,
  // output side (to dct_1d)
  output row_t  readData,
  input  logic  readEn,
  output logic  empty,
  // source select for src_mux: 0 = ping buffer, 1 = transpose buffer
  output logic  MuxSel
);

  typedef enum logic [1:0] {
    ONED_EMPTY = 2'd0,
    ONED_FULL  = 2'd1,
    TWOD_EMPTY = 2'd2,
    TWOD_FULL  = 2'd3
  } state_t;

  state_t state;
  idx_t   coef;   // coefficient being computed within the current line
  idx_t   line;   // row (1-D pass) or column (2-D pass) number
  row_t   data;

  wire is_full  = (state == ONED_FULL) || (state == TWOD_FULL);
  wire do_write = writeEn && !full;
  wire do_read  = readEn  && !empty;

  assign full     = is_full;
  assign empty    = !is_full;
  assign readData = data;
  assign MuxSel   = (state == TWOD_EMPTY) || (state == TWOD_FULL);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ONED_EMPTY;
      coef  <= '0;
      line  <= '0;
      data  <= '0;
    end else begin
      unique case (state)
        ONED_EMPTY: if (do_write) begin data <= writeData; state <= ONED_FULL; end
        TWOD_EMPTY: if (do_write) begin data <= writeData; state <= TWOD_FULL; end
        ONED_FULL, TWOD_FULL: if (do_read) begin
          coef <= coef + 1'b1;
          if (coef == 3'd7) begin
            line <= line + 1'b1;
            if (line == 3'd7) state <= (state == ONED_FULL) ? TWOD_EMPTY : ONED_EMPTY;
            else              state <= (state == ONED_FULL) ? ONED_EMPTY : TWOD_EMPTY;
          end
        end
        default: state <= ONED_EMPTY;
      endcase
    end
  end

  // Handshake rule: the line offered to the core does not change while held.
  assert property (@(posedge clk) disable iff (rst) !empty |=> (empty || $stable(readData)));

endmodule
