// tb_dec_first_round: start of decryption: AddRoundKey with key 10, inverse affine plus change to basis #94, InvShiftRows. The expected inverter inputs are built from the bitwise inverse affine map.
module tb_dec_first_round;
  import aes_tower_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  blk in_a, in_k, out, expected;

  dec_first_round dut (.ct(in_a), .rk(in_k), .u(out));

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
      expected = inv_shift_rows(mblk(XI94, affine_inv_blk(in_a ^ in_k)));
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
