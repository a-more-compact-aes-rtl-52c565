// enc_round: one normal AES encryption round (rounds 1..9) computed entirely in
// tower basis #127: ShiftRows (byte routing), sixteen tower-field Galois
// inverters, the merged affine/MixColumns transformations of enc_mix_column
// for each column, and AddRoundKey with a round key held in the same basis.
// Keeping the state in the tower basis across rounds, instead of converting
// back after every S-box, is the central idea of the source design.
// Purely combinational.
//
// s_in:  state entering the round, tower basis.
// rk:    round key, tower basis.
// s_out: state leaving the round, tower basis.
module enc_round
  import aes_tower_pkg::*;
(
  input  block_t s_in,
  input  block_t rk,
  output block_t s_out
);
  block_t sr, inv, mix;

  assign sr = shift_rows(s_in);

  for (genvar i = 0; i < 16; i++) begin : g_inv
    gf256_inv #(.N(N127), .NU(NU127)) u_inv (
      .a(sr[127 - 8*i -: 8]),
      .y(inv[127 - 8*i -: 8])
    );
  end

  for (genvar c = 0; c < 4; c++) begin : g_col
    enc_mix_column u_mix (
      .a(inv[127 - 32*c -: 32]),
      .y(mix[127 - 32*c -: 32])
    );
  end

  assign s_out = mix ^ rk;
endmodule
