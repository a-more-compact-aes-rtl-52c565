// tb_dec_mix_column: InvMixColumns merged with the next inverse affine map,
// against the reference. Random tower-basis (#94) columns w are mapped to the
// standard basis, multiplied by the inverse MixColumns matrix, put through the
// inverse affine map and mapped back with X^-1.
module tb_dec_mix_column;
  import aes_tower_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] w, u;
  blk col, m;

  dec_mix_column dut (.w(w), .u(u));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    for (int n = 0; n < 2000; n++) begin
      if (n == 0) w = '0;
      else        w = $urandom;
      #1;
      col = '0;
      for (int j = 0; j < 4; j++) col[127-8*j -: 8] = mvec(X94, w[31-8*j -: 8]);
      m = inv_mix_columns(col);
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (u[31-8*j -: 8] !== mvec(XI94, affine_inv(m[127-8*j -: 8]))) begin
          failures++;
          if (failures < 10) $display("w=%h row %0d u=%h", w, j, u[31-8*j -: 8]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
