// tb_enc_last_round: the last encryption round (no MixColumns, result and key in the standard basis) against the reference for random tower-basis states.
module tb_enc_last_round;
  import aes_tower_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  blk in_a, in_k, out, expected;

  enc_last_round dut (.s_in(in_a), .rk(in_k), .ct(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    for (int n = 0; n < 500; n++) begin
      in_a = (n == 0) ? '0 : rand_blk();
      in_k = (n == 0) ? '0 : rand_blk();
      #1;
      expected = shift_rows(sub_bytes(mblk(X127, in_a))) ^ in_k;
      checks++;
      if (out !== expected) begin
        failures++;
        if (failures < 10) $display("in=%h key=%h out=%h expected=%h", in_a, in_k, out, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
