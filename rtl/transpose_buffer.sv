// transpose_buffer: turns eight rows of 1-D coefficients into eight columns.
//
// A 63 x 12-bit shift register reg62..reg0.  Every shift moves reg(i+1) into
// reg(i) and puts the incoming word into reg62; a shift happens when a
// coefficient is written (writeEn, serial-in) or a column is read (readEn,
// parallel-out), once if both happen in the same cycle.  After the first 63
// coefficients c0..c62 of a block have been written (row-major order,
// c(8r+k) = coefficient k of row r), reg(i) = c(i), so the taps
//   column = {reg56, reg48, reg40, reg32, reg24, reg16, reg8, reg0}
// hold column 0 (reg0 = element 0 on bits [11:0]).  Column 0 is handed to the
// pong buffer in the same cycle as the 64th coefficient is shifted in; each
// further read shifts once more, so after s shifts the taps hold column s.
// A read without a write shifts in zero.
// full is never asserted.  empty is low while a column can be read: from the
// 63rd stored coefficient (with the 64th being written) or the 64th until
// the eighth column has been read, after which the buffer restarts for the
// next block.  The shift register and tap positions are the published
// design; the counters behind empty are this design's.
module transpose_buffer
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // input side (from dct_1d)
  input  word_t writeData,
  input  logic  writeEn,
  output logic  full,
  // output side (to src_mux / pong_buffer)
  output row_t  readData,
  input  logic  readEn,
  output logic  empty
);

  word_t      sr [TB_DEPTH];
  logic [6:0] stored;    // coefficients written in this block, 0..64
  idx_t       cols;      // columns already read

  logic col_ok, do_write, do_read;

  assign full     = 1'b0;
  assign do_write = writeEn;
  assign col_ok   = (stored == 7'd63 && writeEn) || (stored == 7'd64 && cols != 3'd0);
  assign empty    = !col_ok;
  assign do_read  = readEn && col_ok;

  always_comb begin
    for (int j = 0; j < N; j++) readData[j*DW +: DW] = sr[j*N];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      stored <= '0;
      cols   <= '0;
      for (int i = 0; i < TB_DEPTH; i++) sr[i] <= '0;
    end else begin
      if (do_write || do_read) begin
        for (int i = 0; i < TB_DEPTH - 1; i++) sr[i] <= sr[i+1];
        sr[TB_DEPTH-1] <= do_write ? writeData : '0;
      end
      if (do_read && cols == 3'd7) begin
        stored <= '0;
        cols   <= '0;
      end else begin
        if (do_write) stored <= stored + 1'b1;
        if (do_read)  cols   <= cols + 1'b1;
      end
    end
  end

  // A block holds 64 coefficients; a 65th may not arrive before its columns
  // have been read.
  assert property (@(posedge clk) disable iff (rst) writeEn |-> stored < 7'd64);
  // Column 0 must be taken in the cycle the 64th coefficient arrives, or the
  // shift would push it out of the taps.
  assert property (@(posedge clk) disable iff (rst) (writeEn && stored == 7'd63) |-> readEn);

endmodule
