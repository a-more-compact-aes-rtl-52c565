// tb_enc_mix_column: the merged affine/MixColumns column unit against the
// reference. Random tower-basis inverter outputs a[0..3] (plus all-zero and
// all-equal corner columns) are mapped to standard basis, put through the
// bitwise affine map and the MixColumns matrix, and mapped back with X^-1.
module tb_enc_mix_column;
  import aes_tower_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] a, y;
  blk col, exp_blk;

  enc_mix_column dut (.a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    for (int n = 0; n < 2000; n++) begin
      if (n == 0)      a = '0;
      else if (n == 1) a = {4{8'h5a}};
      else             a = $urandom;
      #1;
      col = '0;
      for (int j = 0; j < 4; j++) col[127-8*j -: 8] = affine(mvec(X127, a[31-8*j -: 8]));
      exp_blk = mix_columns(col);
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (y[31-8*j -: 8] !== mvec(XI127, exp_blk[127-8*j -: 8])) begin
          failures++;
          if (failures < 10) $display("a=%h row %0d y=%h", a, j, y[31-8*j -: 8]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
