// enc_mix_column: one column of an encryption round after the Galois inverters,
// in tower basis #127: the linear part of the S-box affine transformation
// merged with the x2 / x3 scalings of MixColumns.
//
// MixColumns is split as
//   [2 3 1 1]   [2 3 0 0]   [0 0 1 1]
//   [1 2 3 1] = [0 3 2 0] + [1 1 1 1]
//   [1 1 2 3]   [0 0 2 3]   [1 1 0 0]
//   [3 1 1 2]   [2 0 0 3]   [1 1 1 1]
// so bytes 0 and 2 need only "affine" and "2 x affine", bytes 1 and 3 only
// "affine" and "3 x affine" (the early-transformation strategy). With
// x_j = A a_j (A = X^-1 M X), t_j = A2 a_j or A3 a_j and the shared sums
// s01 = x0+x1, s23 = x2+x3, s = s01+s23, each output needs two more byte
// additions: 11 byte additions per column. Because every row of the
// MixColumns matrix sums to 1, the affine constant c = X^-1 b is added once
// per output byte. The decomposition and strategy follow the source design;
// the matrices are applied as plain XOR trees (no common-subexpression
// optimisation). Purely combinational.
//
// a: the four inverter outputs of one column (row 0 in bits 31:24), tower basis.
// y: S-box + MixColumns result of that column (same byte order), tower basis (round key not added).
module enc_mix_column
  import aes_tower_pkg::*;
(
  input  logic [31:0] a,
  output logic [31:0] y
);
  byte_t x [4], t [4];
  byte_t s01, s23, s;

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      x[j] = mat_apply(ENC_A, a[31 - 8*j -: 8]);
      t[j] = mat_apply((j % 2 == 0) ? ENC_A2 : ENC_A3, a[31 - 8*j -: 8]);
    end
    s01  = x[0] ^ x[1];
    s23  = x[2] ^ x[3];
    s    = s01 ^ s23;
    y[31:24] = t[0] ^ t[1] ^ s23 ^ ENC_C;
    y[23:16] = t[1] ^ t[2] ^ s   ^ ENC_C;
    y[15:8] = t[2] ^ t[3] ^ s01 ^ ENC_C;
    y[7:0] = t[0] ^ t[3] ^ s   ^ ENC_C;
  end
endmodule
