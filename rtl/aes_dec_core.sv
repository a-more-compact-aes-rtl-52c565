// aes_dec_core: iterative AES-128 decryption, one round per clock, with the
// state held in tower basis #94.
//
// A start (accepted only while idle) loads dec_first_round(ct, rk10) into the
// state register; round key 10 is converted to the standard basis with X.
// Clocks 1..9 apply dec_round with round keys 9..1 (tower basis); clock 10
// applies dec_last_round with round key 0 converted to the standard basis and
// writes the plaintext. done pulses for one clock; start to done is 11 clocks.
// Round keys are read combinationally from an external key_schedule through
// rk_idx/rk.
//
// The round split (inverse affine merged into the step before each inverter,
// InvMixColumns merged with the next inverse affine) follows the source
// design; the iterative schedule, handshake and reset are this design's own.
module aes_dec_core
  import aes_tower_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t ct,
  output logic   busy,
  output logic   done,
  output block_t pt,
  output rnd_t   rk_idx,
  input  block_t rk
);
  block_t state, s_first, s_round, s_last, rk_std;
  rnd_t   rnd;

  assign rk_idx = busy ? rnd : 4'(NR);
  assign rk_std = mat_apply_block(X94, rk);

  dec_first_round u_first (.ct(ct),      .rk(rk_std), .u(s_first));
  dec_round       u_round (.u_in(state), .rk(rk),     .u_out(s_round));
  dec_last_round  u_last  (.u_in(state), .rk(rk_std), .pt(s_last));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      rnd   <= '0;
      state <= '0;
      pt    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state <= s_first;
          rnd   <= 4'(NR - 1);
          busy  <= 1'b1;
        end
      end else if (rnd == 4'd0) begin
        pt   <= s_last;
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        state <= s_round;
        rnd   <= rnd - 4'd1;
      end
    end
  end

  a_done_timing: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> ##(NR + 1) done);
endmodule
