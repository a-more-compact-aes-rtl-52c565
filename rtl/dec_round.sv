// dec_round: one normal AES decryption round in tower basis #94. Its input is
// already the set of Galois-inverter inputs (the inverse affine map was merged
// into the previous step). The round runs the sixteen inverters, adds the round
// key (tower basis), and applies dec_mix_column to each column, which performs
// InvMixColumns together with the inverse affine map of the next S-box; the
// bytes are then routed by InvShiftRows so that the output again is a set of
// inverter inputs. Purely combinational.
//
// u_in:  inverter inputs, tower basis.
// rk:    round key of this round, tower basis.
// u_out: inverter inputs of the next round, tower basis.
module dec_round
  import aes_tower_pkg::*;
(
  input  block_t u_in,
  input  block_t rk,
  output block_t u_out
);
  block_t inv, w, mix;

  for (genvar i = 0; i < 16; i++) begin : g_inv
    gf256_inv #(.N(N94), .NU(NU94)) u_inv (
      .a(u_in[127 - 8*i -: 8]),
      .y(inv[127 - 8*i -: 8])
    );
  end

  assign w = inv ^ rk;

  for (genvar c = 0; c < 4; c++) begin : g_col
    dec_mix_column u_mix (
      .w(w[127 - 32*c -: 32]),
      .u(mix[127 - 32*c -: 32])
    );
  end

  assign u_out = inv_shift_rows(mix);
endmodule
