// dct_weight_rom: the 8 x 40-bit weight look-up table of the 1-D DCT.
//
// Addressed by the 3-bit index k of the coefficient being computed, a row
// holds the four 10-bit two's complement weights {w3, w2, w1, w0} that
// multiply the four add/sub results X of the even (k even) or odd (k odd)
// butterfly:
//   z_k = w0*X(x0,x7) + w1*X(x1,x6) + w2*X(x2,x5) + w3*X(x3,x4)
// with a..g = C1..C7 (see dct_pkg).  The sign pattern of each row is the
// 8-point DCT's; w0 sits in bits [9:0] as in the architecture's figure.
// Purely combinational: the row is valid in the same cycle as the index.
module dct_weight_rom
  import dct_pkg::*;
(
  input  idx_t             idx,
  output logic [LUT_W-1:0] w
);

  always_comb begin
    unique case (idx)
      3'd0: w = {CD,  CD,  CD,  CD};
      3'd1: w = {CG,  CE,  CC,  CA};
      3'd2: w = {-CB, -CF, CF,  CB};
      3'd3: w = {-CE, -CA, -CG, CC};
      3'd4: w = {CD,  -CD, -CD, CD};
      3'd5: w = {CC,  CG,  -CA, CE};
      3'd6: w = {-CF, CB,  -CB, CF};
      3'd7: w = {-CA, CC,  -CE, CG};
      default: w = '0;
    endcase
  end

endmodule
