// dec_first_round: the start of decryption. Round key 10 (standard basis) is
// added to the ciphertext; then each byte gets the inverse affine map of the
// first inverse S-box merged with the change into tower basis #94, i.e. the
// matrix X^-1 M^-1 plus the constant d = X^-1 M^-1 b; InvShiftRows routes the
// bytes. The result is the set of Galois-inverter inputs of the first normal
// decryption round. Purely combinational.
//
// ct: ciphertext, standard basis.
// rk: round key 10, standard basis.
// u:  inverter inputs for the next round, tower basis #94.
module dec_first_round
  import aes_tower_pkg::*;
(
  input  block_t ct,
  input  block_t rk,
  output block_t u
);
  assign u = inv_shift_rows(mat_apply_block(DEC_IN, ct ^ rk) ^ {16{DEC_D}});
endmodule
