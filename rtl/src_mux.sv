// src_mux: the pong buffer's source selector.
//
// MuxSel = 0 connects the pong buffer to the ping buffer (a row of pixels
// for the first, row-wise pass); MuxSel = 1 connects it to the transpose
// buffer (a column of 1-D coefficients for the second, column-wise pass).
// The selected source's 96-bit readData and empty flag are passed to the
// consumer, and the consumer's readEn is returned only to the selected
// source; the other source sees readEn = 0 and keeps its data.  Purely
// combinational.  The published architecture shows this multiplexer and
// its MuxSel control; routing of empty and readEn through it is how this
// design realises the handshakes drawn around it.
module src_mux
  import dct_pkg::*;
(
  input  logic  sel,          // MuxSel
  // source 0: ping buffer
  input  row_t  a_readData,
  input  logic  a_empty,
  output logic  a_readEn,
  // source 1: transpose buffer
  input  row_t  b_readData,
  input  logic  b_empty,
  output logic  b_readEn,
  // consumer side
  output row_t  readData,
  output logic  empty,
  input  logic  readEn
);

  always_comb begin
    readData = sel ? b_readData : a_readData;
    empty    = sel ? b_empty    : a_empty;
    a_readEn = readEn && !sel;
    b_readEn = readEn &&  sel;
  end

endmodule
