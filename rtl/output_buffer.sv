// output_buffer: two-entry FIFO between the 2-D DCT core and its consumer.
//
// Registers reg0 (head, always the word on readData) and reg1, controlled by
// a three-state FSM:
//   EMPTY:       nothing held; a write goes to reg0 -> ALMOST_FULL.
//                full = 0, empty = 1.
//   ALMOST_FULL: reg0 valid.  Write and read together: reg0 takes the new
//                word.  Write only: reg1 takes it -> FULL.  Read only:
//                -> EMPTY.  full = 0, empty = 0.
//   FULL:        both valid; a read copies reg1 into reg0 -> ALMOST_FULL.
//                full = 1, empty = 0.
// A word written in one cycle can be read in the next: one cycle of latency.
// Handshakes are FIFO-like (see ping_buffer).  This is the published
// behaviour, with one deliberate reading: empty is low in ALMOST_FULL, since
// reg0 then holds a word that can be read.
module output_buffer
  import dct_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] writeData,
  input  logic         writeEn,
  output logic         full,
  output logic [W-1:0] readData,
  input  logic         readEn,
  output logic         empty
);

  typedef enum logic [1:0] {EMPTY = 2'd0, ALMOST_FULL = 2'd1, FULL = 2'd2} state_t;

  state_t       state;
  logic [W-1:0] reg0, reg1;

  assign full     = (state == FULL);
  assign empty    = (state == EMPTY);
  assign readData = reg0;

  wire do_write = writeEn && !full;
  wire do_read  = readEn  && !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= EMPTY;
      reg0  <= '0;
      reg1  <= '0;
    end else begin
      unique case (state)
        EMPTY: if (do_write) begin
          reg0  <= writeData;
          state <= ALMOST_FULL;
        end
        ALMOST_FULL: begin
          if (do_write && do_read) reg0 <= writeData;
          else if (do_write) begin
            reg1  <= writeData;
            state <= FULL;
          end else if (do_read) state <= EMPTY;
        end
        FULL: if (do_read) begin
          reg0  <= reg1;
          state <= ALMOST_FULL;
        end
        default: state <= EMPTY;
      endcase
    end
  end

  // Handshake rule: an offered word stays unchanged until it is read.
  assert property (@(posedge clk) disable iff (rst) (!empty && !readEn) |=> $stable(readData));

endmodule
