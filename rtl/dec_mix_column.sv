// dec_mix_column: one column of InvMixColumns in tower basis #94, merged with
// the inverse affine transformation of the S-box of the following round.
//
// The inverse MixColumns matrix is split as
//   [E B D 9]   [3 2 0 0]       [1 0 1 0]       [0 1 0 1]
//   [9 E B D] = [0 3 2 0] + D x [0 1 0 1] + 9 x [1 0 1 0]
//   [D 9 E B]   [0 0 3 2]       [1 0 1 0]       [0 1 0 1]
//   [B D 9 E]   [2 0 0 3]       [0 1 0 1]       [1 0 1 0]
// Each byte w_j gets B2 = X^-1 M^-1 T2 X and B3 = X^-1 M^-1 T3 X; the two shared
// sums e02 = w0+w2 and e13 = w1+w3 each get BD and B9 (the later-transformation
// strategy), giving P = BD e02 + B9 e13 and Q = BD e13 + B9 e02. Each output
// then takes two more additions: 12 byte additions per column. The constant
// d = X^-1 M^-1 b of the inverse affine map is added once per output byte,
// since every row of the inverse MixColumns matrix sums to 1. Decomposition and
// strategy follow the source design; the XOR trees are not minimised.
// Purely combinational.
//
// w: one column after AddRoundKey (row 0 in bits 31:24), tower basis.
// u: the Galois-inverter inputs for that column's bytes in the next round
//    (before InvShiftRows).
module dec_mix_column
  import aes_tower_pkg::*;
(
  input  logic [31:0] w,
  output logic [31:0] u
);
  byte_t wb [4], p2 [4], p3 [4];
  byte_t e02, e13, pp, qq;

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      wb[j] = w[31 - 8*j -: 8];
      p2[j] = mat_apply(DEC_B2, wb[j]);
      p3[j] = mat_apply(DEC_B3, wb[j]);
    end
    e02  = wb[0] ^ wb[2];
    e13  = wb[1] ^ wb[3];
    pp   = mat_apply(DEC_BD, e02) ^ mat_apply(DEC_B9, e13);
    qq   = mat_apply(DEC_BD, e13) ^ mat_apply(DEC_B9, e02);
    u[31:24] = p3[0] ^ p2[1] ^ pp ^ DEC_D;
    u[23:16] = p3[1] ^ p2[2] ^ qq ^ DEC_D;
    u[15:8] = p3[2] ^ p2[3] ^ pp ^ DEC_D;
    u[7:0] = p2[0] ^ p3[3] ^ qq ^ DEC_D;
  end
endmodule
