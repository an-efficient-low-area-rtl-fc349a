// ping_buffer: serial-in, parallel-out buffer for one row of eight pixels.
//
// A 96-bit shift register driven by a two-state FSM:
//   EMPTY (serial-in):  each accepted word is shifted in at the top
//                       (bits [95:84]) while the register moves down by one
//                       word; after the eighth word the FSM goes to FULL.
//                       full = 0, empty = 1.
//   FULL (parallel-out): the whole row is offered on readData; when readEn
//                       is high the row is taken and the FSM returns to
//                       EMPTY.  full = 1, empty = 0.
// Because words enter at the top and move down, the first pixel of a row
// ends up in bits [11:0] (element 0) and the eighth in bits [95:84].
// A row therefore costs at least nine cycles: eight to load, one to hand
// over; the eight pixels of a row are never loaded while the previous row is
// still waiting.  Both handshakes follow the FIFO-like rule: a word moves on
// the rising edge when the enable is high and full (write) or empty (read)
// is low.  The behaviour is the published one; the synchronous active-high
// reset and the 3-bit word counter are this design's choices.
module ping_buffer
  import dct_pkg::*;
#(
  parameter int unsigned WORDS = N,   // words per row
  parameter int unsigned W     = DW   // word width
) (
  input  logic               clk,
  input  logic               rst,
  // input side
  input  logic [W-1:0]       writeData,
  input  logic               writeEn,
  output logic               full,
  // output side
  output logic [WORDS*W-1:0] readData,
  input  logic               readEn,
  output logic               empty
);

  typedef enum logic {S_EMPTY, S_FULL} state_t;

  state_t                       state;
  logic [$clog2(WORDS)-1:0]     cnt;
  logic [WORDS*W-1:0]           sr;

  wire do_write = writeEn && !full;
  wire do_read  = readEn  && !empty;

  assign full     = (state == S_FULL);
  assign empty    = (state == S_EMPTY);
  assign readData = sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_EMPTY;
      cnt   <= '0;
      sr    <= '0;
    end else begin
      unique case (state)
        S_EMPTY: if (do_write) begin
          sr <= {writeData, sr[WORDS*W-1:W]};
          if (cnt == ($clog2(WORDS))'(WORDS - 1)) begin
            cnt   <= '0;
            state <= S_FULL;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_FULL: if (do_read) state <= S_EMPTY;
        default: state <= S_EMPTY;
      endcase
    end
  end

  // Handshake rule: an offered row stays unchanged until it is read.
  assert property (@(posedge clk) disable iff (rst) (!empty && !readEn) |=> $stable(readData));

endmodule
