// dct2d_top: 8x8 two-dimensional DCT by row-column decomposition.
//
// Pixels (12-bit signed, i.e. already level-shifted) enter row by row through
// a FIFO-like write port; 2-D coefficients leave in column order through a
// FIFO-like read port.  One 1-D DCT core is shared by both passes:
//   ping_buffer  collects a row of eight pixels;
//   src_mux      feeds the pong buffer from the ping buffer (MuxSel = 0) or
//                the transpose buffer (MuxSel = 1);
//   pong_buffer  holds a row/column for the eight cycles the core needs;
//   dct_1d       produces one coefficient per cycle and sends 1-D results to
//                the transpose buffer, 2-D results to the output buffer;
//   transpose_buffer  stores the 64 1-D coefficients and reads them back as
//                columns;
//   output_buffer  two-word FIFO towards the consumer.
// Every link uses the same rule: the producer's readData drives the
// consumer's writeData, writeEn = !empty of the producer and readEn = !full
// of the consumer, so the whole pipeline stops when the consumer stops
// reading.
// Output order: for column c = 0..7, coefficients k = 0..7 of that column,
// i.e. word 8c+k is Z[k][c] (vertical frequency k, horizontal frequency c).
// Timing without back-pressure: the first coefficient can be read 83 cycles
// after the first pixel is written, the last of a block 153 cycles after it,
// and back-to-back blocks are accepted every 144 cycles.  The structure and
// interfaces are the published design; reset (synchronous, active high) is
// this design's choice.
module dct2d_top
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // pixel input
  input  word_t writeData,
  input  logic  writeEn,
  output logic  full,
  // coefficient output
  output word_t readData,
  input  logic  readEn,
  output logic  empty
);

  // ping -> mux
  row_t  ping_data;
  logic  ping_empty, ping_rd;
  // transpose -> mux
  row_t  tr_data;
  logic  tr_empty, tr_rd, tr_full;
  // mux -> pong
  row_t  mux_data;
  logic  mux_empty, mux_rd;
  logic  mux_sel;
  // pong -> dct
  row_t  pong_data;
  logic  pong_empty, pong_full;
  // dct -> transpose / output buffer
  word_t dct_data;
  logic  dct_full, dct_empty_tr, dct_empty_ob;
  logic  ob_full;

  ping_buffer u_ping (
    .clk, .rst,
    .writeData (writeData),
    .writeEn   (writeEn),
    .full      (full),
    .readData  (ping_data),
    .readEn    (ping_rd),
    .empty     (ping_empty)
  );

  src_mux u_mux (
    .sel        (mux_sel),
    .a_readData (ping_data),
    .a_empty    (ping_empty),
    .a_readEn   (ping_rd),
    .b_readData (tr_data),
    .b_empty    (tr_empty),
    .b_readEn   (tr_rd),
    .readData   (mux_data),
    .empty      (mux_empty),
    .readEn     (mux_rd)
  );

  pong_buffer u_pong (
    .clk, .rst,
    .writeData (mux_data),
    .writeEn   (!mux_empty),
    .full      (pong_full),
    .readData  (pong_data),
    .readEn    (!dct_full),
    .empty     (pong_empty),
    .MuxSel    (mux_sel)
  );
  assign mux_rd = !pong_full;

  dct_1d u_dct (
    .clk, .rst,
    .writeData        (pong_data),
    .writeEn          (!pong_empty),
    .full             (dct_full),
    .readData         (dct_data),
    .readEn_transpose (!tr_full),
    .empty_transpose  (dct_empty_tr),
    .readEn_outbuff   (!ob_full),
    .empty_outbuff    (dct_empty_ob)
  );

  transpose_buffer u_tr (
    .clk, .rst,
    .writeData (dct_data),
    .writeEn   (!dct_empty_tr),
    .full      (tr_full),
    .readData  (tr_data),
    .readEn    (tr_rd),
    .empty     (tr_empty)
  );

  output_buffer u_ob (
    .clk, .rst,
    .writeData (dct_data),
    .writeEn   (!dct_empty_ob),
    .full      (ob_full),
    .readData  (readData),
    .readEn    (readEn),
    .empty     (empty)
  );

endmodule
