// enc_last_round: final encryption round (round 10), which has no MixColumns.
// ShiftRows and the sixteen Galois inverters work in tower basis #127; the
// affine transformation is then merged with the change back to the standard
// basis into the single matrix M X, and the constant b = 0x63 is added (the
// source design notes it may instead be folded into the last round key; here
// it is an explicit inversion of the affected bits). Finally round key 10,
// in the standard basis, is added. Purely combinational.
//
// s_in: state entering round 10, tower basis.
// rk:   round key 10, standard basis.
// ct:   ciphertext, standard basis.
module enc_last_round
  import aes_tower_pkg::*;
(
  input  block_t s_in,
  input  block_t rk,
  output block_t ct
);
  block_t sr, inv;

  assign sr = shift_rows(s_in);

  for (genvar i = 0; i < 16; i++) begin : g_inv
    gf256_inv #(.N(N127), .NU(NU127)) u_inv (
      .a(sr[127 - 8*i -: 8]),
      .y(inv[127 - 8*i -: 8])
    );
  end

  assign ct = mat_apply_block(ENC_OUT, inv) ^ {16{AFF_B}} ^ rk;
endmodule
