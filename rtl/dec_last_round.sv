// dec_last_round: end of decryption. The sixteen Galois inverters complete the
// last inverse S-box in tower basis #94, the matrix X returns each byte to the
// standard basis, and round key 0 (the cipher key, standard basis) is added.
// Purely combinational.
//
// u_in: inverter inputs, tower basis.
// rk:   round key 0, standard basis.
// pt:   plaintext, standard basis.
module dec_last_round
  import aes_tower_pkg::*;
(
  input  block_t u_in,
  input  block_t rk,
  output block_t pt
);
  block_t inv;

  for (genvar i = 0; i < 16; i++) begin : g_inv
    gf256_inv #(.N(N94), .NU(NU94)) u_inv (
      .a(u_in[127 - 8*i -: 8]),
      .y(inv[127 - 8*i -: 8])
    );
  end

  assign pt = mat_apply_block(DEC_OUT, inv) ^ rk;
endmodule
