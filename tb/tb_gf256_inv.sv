// tb_gf256_inv: exhaustive check of the tower-field GF(2^8) inverter in both
// bases. For every tower byte a, X*y must equal the standard-basis inverse
// (x^254) of X*a.
module tb_gf256_inv;
  import aes_tower_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] a, y127, y94;

  gf256_inv #(.N(N127), .NU(NU127)) dut127 (.a(a), .y(y127));
  gf256_inv #(.N(N94),  .NU(NU94))  dut94  (.a(a), .y(y94));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      a = 8'(v);
      #1;
      checks += 2;
      if (mvec(X127, y127) !== ginv(mvec(X127, a))) begin
        failures++; $display("basis127 a=%h y=%h", a, y127);
      end
      if (mvec(X94, y94) !== ginv(mvec(X94, a))) begin
        failures++; $display("basis94 a=%h y=%h", a, y94);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
