// dct_1d: the time-shared 8-point 1-D DCT core.
//
// Each accepted 96-bit input word x0..x7 (element i in bits [12i+11:12i])
// yields one coefficient z_k.  The core counts accepted words: k is the count
// modulo 8, and the count modulo 128 tells whether the word belongs to the
// first (row-wise, 1-D) or second (column-wise, 2-D) pass of a block.
//   1. Four 12-bit add/sub units form X_j = x_j + x_(7-j) for even k or
//      X_j = x_j - x_(7-j) for odd k (OddSel = k[0]).
//   2. Four signed 12 x 10 multipliers form X_j * w_j, the weights w_j coming
//      from the 8 x 40-bit LUT row k (dct_weight_rom).
//   3. The four 22-bit products are stored in the 88-bit pipeline register,
//      together with a tag saying which pass they belong to.  A two-state
//      EMPTY/FULL FSM controls it: a word is loaded when writeEn is high and
//      full is low; the stored result is offered to the transpose buffer
//      (1-D pass, empty_transpose = 0) or to the output buffer (2-D pass,
//      empty_outbuff = 0) and leaves on that consumer's readEn.
//      full = FULL state and the consumer not reading, so a new word can be
//      loaded in the same cycle the old one leaves.
//   4. Behind the register each product is rounded to 12 bits (dct_round)
//      and a 12-bit two-level adder tree forms readData = z_k.
// Latency: one cycle (the register).  Throughput: one coefficient per cycle.
// Structure, widths and FSM follow the published architecture; the pass tag
// and the internal word counter are this design's way of steering results,
// which the architecture leaves open.
module dct_1d
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // input side (from pong_buffer)
  input  row_t  writeData,
  input  logic  writeEn,
  output logic  full,
  // output side, shared data bus for both consumers
  output word_t readData,
  input  logic  readEn_transpose,
  output logic  empty_transpose,
  input  logic  readEn_outbuff,
  output logic  empty_outbuff
);

  // ---------------- input side: add/sub and multiply ----------------
  logic [6:0]       wcnt;        // accepted words within a block (2 x 64)
  idx_t             k;
  logic             odd_sel;
  logic [LUT_W-1:0] w;
  word_t            xs [4];
  prod_t            p  [4];

  assign k       = wcnt[2:0];
  assign odd_sel = k[0];

  dct_weight_rom u_rom (.idx(k), .w(w));

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      word_t lo, hi;
      lo = row_elem(writeData, j);
      hi = row_elem(writeData, N - 1 - j);
      xs[j] = odd_sel ? word_t'(lo - hi) : word_t'(lo + hi);
      p[j]  = prod_t'(xs[j]) * prod_t'(weight_t'(w[j*WW +: WW]));
    end
  end

  // ---------------- 88-bit pipeline register ----------------
  typedef enum logic {R_EMPTY, R_FULL} rstate_t;
  rstate_t          rstate;
  logic [REG_W-1:0] preg;
  logic             pass_q;      // 0: 1-D (row) result, 1: 2-D (column) result

  logic rd, do_write, do_read;
  assign rd       = pass_q ? readEn_outbuff : readEn_transpose;
  assign do_read  = (rstate == R_FULL) && rd;
  assign full     = (rstate == R_FULL) && !rd;
  assign do_write = writeEn && !full;

  assign empty_transpose = !((rstate == R_FULL) && !pass_q);
  assign empty_outbuff   = !((rstate == R_FULL) &&  pass_q);

  always_ff @(posedge clk) begin
    if (rst) begin
      rstate <= R_EMPTY;
      preg   <= '0;
      pass_q <= 1'b0;
      wcnt   <= '0;
    end else begin
      if (do_write) begin
        preg   <= {p[3], p[2], p[1], p[0]};
        pass_q <= wcnt[6];
        wcnt   <= wcnt + 1'b1;
        rstate <= R_FULL;
      end else if (do_read) begin
        rstate <= R_EMPTY;
      end
    end
  end

  // ---------------- rounding and adder tree ----------------
  word_t r [4];
  for (genvar j = 0; j < 4; j++) begin : g_round
    dct_round u_round (.r(prod_t'(preg[j*PW +: PW])), .q(r[j]));
  end

  word_t s01, s23;
  always_comb begin
    s01      = r[0] + r[1];
    s23      = r[2] + r[3];
    readData = s01 + s23;
  end

  // The two consumers are never offered a result at the same time.
  assert property (@(posedge clk) disable iff (rst) !(!empty_transpose && !empty_outbuff));

  // A held result stays unchanged until its consumer takes it.
  assert property (@(posedge clk) disable iff (rst) (rstate == R_FULL && !rd) |=> $stable(preg));

endmodule
