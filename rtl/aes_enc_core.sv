// aes_enc_core: iterative AES-128 encryption, one round per clock, with the
// state held in tower basis #127 from round 0 to the last round.
//
// A start (accepted only while idle) loads enc_first_round(pt, rk0) into the
// state register. Clocks 1..9 apply enc_round with round keys 1..9; clock 10
// applies enc_last_round, whose round key 10 is converted back to the standard
// basis with X, and writes the ciphertext. done pulses for one clock with ct
// valid from then on; the next start may be given in that same cycle. Start to
// done is 11 clocks. The round keys come from an external store (key_schedule)
// through rk_idx/rk, read combinationally.
//
// The round decomposition (one module per kind of round) follows the source
// design; the iterative one-round-per-clock schedule, handshake and reset are
// this design's choices, as the source proposes no particular architecture.
module aes_enc_core
  import aes_tower_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t pt,
  output logic   busy,
  output logic   done,
  output block_t ct,
  output rnd_t   rk_idx,
  input  block_t rk
);
  block_t state, s_first, s_round, s_last;
  rnd_t   rnd;

  assign rk_idx = busy ? rnd : 4'd0;

  enc_first_round u_first (.pt(pt),       .rk(rk),                        .s(s_first));
  enc_round       u_round (.s_in(state),  .rk(rk),                        .s_out(s_round));
  enc_last_round  u_last  (.s_in(state),  .rk(mat_apply_block(X127, rk)), .ct(s_last));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      rnd   <= '0;
      state <= '0;
      ct    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state <= s_first;
          rnd   <= 4'd1;
          busy  <= 1'b1;
        end
      end else if (rnd == 4'(NR)) begin
        ct   <= s_last;
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        state <= s_round;
        rnd   <= rnd + 4'd1;
      end
    end
  end

  // A started block always finishes exactly NR + 1 clocks later.
  a_done_timing: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> ##(NR + 1) done);
endmodule
