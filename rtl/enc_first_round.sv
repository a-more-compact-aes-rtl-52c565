// enc_first_round: round 0 of encryption. Each plaintext byte is moved from the
// standard AES representation into tower basis #127 by the matrix X^-1, then
// round key 0 (already in the tower basis) is added. As in the source design,
// the basis change is counted as part of this initial AddRoundKey; the XOR
// trees are direct matrix products, not minimised. Purely combinational.
//
// pt: plaintext block, standard basis, byte 0 in bits 127:120.
// rk: round key 0, tower basis #127.
// s:  state after round 0, tower basis #127.
module enc_first_round
  import aes_tower_pkg::*;
(
  input  block_t pt,
  input  block_t rk,
  output block_t s
);
  assign s = mat_apply_block(ENC_IN, pt) ^ rk;
endmodule
