// tb_gf16_inv: exhaustive check of the GF(2^4) sub-inverter for both towers.
// A GF(2^4) element g sits in GF(2^8) as the tower byte {g, g} (g*(Y^16+Y));
// its standard-basis image X*{g,g} is inverted by the reference (x^254) and
// compared with X*{y,y}. Runs all 16 inputs for N of basis #127 and #94.
module tb_gf16_inv;
  import aes_tower_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] a, y127, y94;

  gf16_inv #(.N(N127)) dut127 (.a(a), .y(y127));
  gf16_inv #(.N(N94))  dut94  (.a(a), .y(y94));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      a = 4'(v);
      #1;
      checks += 2;
      if (mvec(X127, {y127, y127}) !== ginv(mvec(X127, {a, a}))) begin
        failures++; $display("basis127 a=%h y=%h", a, y127);
      end
      if (mvec(X94, {y94, y94}) !== ginv(mvec(X94, {a, a}))) begin
        failures++; $display("basis94 a=%h y=%h", a, y94);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
