// dct_round: rounds one 22-bit signed product r to a 12-bit signed word.
//
// The kept bits are r[21:10]; r[9] (weight 1/2 of the kept LSB) decides
// whether one is added, i.e. round half up.  A positive value whose kept
// bits are already the largest positive 12-bit number is not incremented,
// so the result saturates instead of wrapping.  A negative value can never
// overflow when incremented.  This is the rounding rule of the published
// architecture; the module is purely combinational.
module dct_round
  import dct_pkg::*;
(
  input  prod_t r,
  output word_t q
);

  localparam word_t MAX_POS = word_t'({1'b0, {(DW-1){1'b1}}});

  word_t kept;
  logic  at_max;
  assign kept   = r[PW-1 -: DW];
  assign at_max = !r[PW-1] && (kept == MAX_POS);
  assign q      = (r[WW-1] && !at_max) ? word_t'(kept + word_t'(1)) : kept;

endmodule
