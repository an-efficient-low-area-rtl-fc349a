// dct_pkg: widths and constants shared by the 8x8 2-D DCT core.
//
// Every datapath word is a 12-bit two's complement number: pixels entering
// the core (level-shifted to signed), 1-D coefficients travelling through the
// transpose buffer and the final 2-D coefficients.  A row or column of eight
// such words is a 96-bit bus with element i in bits [12*i+11 : 12*i].
// Multiplier weights are 10-bit two's complement fractions with 10 fraction
// bits (value = weight / 1024), so a 12 x 10 product is 22 bits and the
// rounding step keeps product bits [21:10].
//
// The DCT constants are C_k = 0.5 * cos(k * pi / 16), k = 1..7, quantised as
// round(1024 * C_k).  Widths, the 8-point size and the weight format follow
// the published architecture; the quantisation to nearest is this design's
// choice.
package dct_pkg;

  localparam int unsigned N       = 8;          // points per 1-D transform
  localparam int unsigned DW      = 12;         // data word width
  localparam int unsigned ROW_W   = N * DW;     // 96-bit row/column bus
  localparam int unsigned WW      = 10;         // weight width
  localparam int unsigned PW      = DW + WW;    // 22-bit product width
  localparam int unsigned LUT_W   = 4 * WW;     // 40-bit weight LUT row
  localparam int unsigned REG_W   = 4 * PW;     // 88-bit product register
  localparam int unsigned TB_DEPTH = N * N - 1; // 63 transpose registers

  typedef logic signed [DW-1:0] word_t;
  typedef logic signed [WW-1:0] weight_t;
  typedef logic signed [PW-1:0] prod_t;
  typedef logic [ROW_W-1:0]     row_t;
  typedef logic [2:0]           idx_t;

  // round(1024 * 0.5 * cos(k*pi/16))
  localparam weight_t CA = 10'sd502;  // C1
  localparam weight_t CB = 10'sd473;  // C2
  localparam weight_t CC = 10'sd426;  // C3
  localparam weight_t CD = 10'sd362;  // C4
  localparam weight_t CE = 10'sd284;  // C5
  localparam weight_t CF = 10'sd196;  // C6
  localparam weight_t CG = 10'sd100;  // C7

  // Element i of a packed row.
  function automatic word_t row_elem(row_t r, int unsigned i);
    return word_t'(r[i*DW +: DW]);
  endfunction

endpackage
