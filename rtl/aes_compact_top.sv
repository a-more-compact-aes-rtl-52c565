// aes_compact_top: AES-128 encryptor and decryptor built on tower-field
// arithmetic, sharing one key-load port.
//
// The encryption side keeps its data and round keys in tower basis #127, the
// decryption side in tower basis #94 (each basis is the one that makes that
// direction's rounds smallest; the two directions are separate datapaths, not
// a merged encrypt/decrypt unit). Each side has its own key_schedule, which
// expands the same cipher key directly in its basis, and its own iterative core.
//
// Interface (all synchronous to clk, active-low asynchronous reset rst_n):
//   key_load/key      load a new cipher key; accepted only when key_load_ready
//                     (both cores idle). Expansion takes 11 clocks; key_ready
//                     is high once both schedules hold the new keys.
//   enc_in_valid/enc_in_ready/enc_in   plaintext handshake; a block is taken
//                     when valid and ready are both high.
//   enc_out_valid/enc_out              one-clock pulse with the ciphertext,
//                     11 clocks after acceptance (no back-pressure).
//   dec_*             the same for decryption (ciphertext in, plaintext out).
// The handshake and timing are this design's choices.
module aes_compact_top
  import aes_tower_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key,
  output logic   key_load_ready,
  output logic   key_ready,
  input  logic   enc_in_valid,
  output logic   enc_in_ready,
  input  block_t enc_in,
  output logic   enc_out_valid,
  output block_t enc_out,
  input  logic   dec_in_valid,
  output logic   dec_in_ready,
  input  block_t dec_in,
  output logic   dec_out_valid,
  output block_t dec_out
);
  logic   enc_busy, dec_busy, ks_enc_ready, ks_dec_ready, load;
  rnd_t   enc_rk_idx, dec_rk_idx;
  block_t enc_rk, dec_rk;

  assign key_load_ready = !enc_busy && !dec_busy;
  assign load           = key_load && key_load_ready;
  assign key_ready      = ks_enc_ready && ks_dec_ready;
  assign enc_in_ready   = key_ready && !enc_busy && !key_load;
  assign dec_in_ready   = key_ready && !dec_busy && !key_load;

  key_schedule #(.XM(X127), .XIM(XI127), .N(N127), .NU(NU127)) u_ks_enc (
    .clk, .rst_n, .key_load(load), .key, .ready(ks_enc_ready),
    .rd_idx(enc_rk_idx), .rd_key(enc_rk)
  );

  key_schedule #(.XM(X94), .XIM(XI94), .N(N94), .NU(NU94)) u_ks_dec (
    .clk, .rst_n, .key_load(load), .key, .ready(ks_dec_ready),
    .rd_idx(dec_rk_idx), .rd_key(dec_rk)
  );

  aes_enc_core u_enc (
    .clk, .rst_n, .start(enc_in_valid && enc_in_ready), .pt(enc_in),
    .busy(enc_busy), .done(enc_out_valid), .ct(enc_out),
    .rk_idx(enc_rk_idx), .rk(enc_rk)
  );

  aes_dec_core u_dec (
    .clk, .rst_n, .start(dec_in_valid && dec_in_ready), .ct(dec_in),
    .busy(dec_busy), .done(dec_out_valid), .pt(dec_out),
    .rk_idx(dec_rk_idx), .rk(dec_rk)
  );

  // Round keys must stay valid for the whole of every block in flight.
  a_keys_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (enc_busy || dec_busy) |-> key_ready);
endmodule
