// gf256_inv: inverter of GF(2^8) (x -> x^254, so 0 -> 0) in a normal-basis
// tower GF(2^8)/GF(2^4)/GF(2^2).
//
// The input a = {a1, a0} stands for a1*Y^16 + a0*Y with a1, a0 in GF(2^4).
// With unit trace (Y^16 + Y = 1) and norm nu = Y^17:
//     d = a1*a0 + nu*(a1 + a0)^2      (one GF(2^4) product, square, scaling)
//     t = d^-1                        (gf16_inv, the 4-bit sub-inverter)
//     a^-1 = (t*a0)*Y^16 + (t*a1)*Y   (two GF(2^4) products)
// This is the S-box core of every round. The tower structure and bases are
// those of the source design; the gates are a direct rendering of the formulas
// above rather than the source's hand-optimised netlist, so the cell count is
// somewhat above its 96 operations per byte. Purely combinational.
//
// Parameters N and NU: the GF(2^4)/GF(2^2) and GF(2^8)/GF(2^4) norms of the
// chosen tower (N127/NU127 or N94/NU94 from aes_tower_pkg).
module gf256_inv
  import aes_tower_pkg::*;
#(
  parameter logic [1:0] N  = N127,
  parameter logic [3:0] NU = NU127
) (
  input  byte_t a,
  output byte_t y
);
  logic [3:0] s, d, t;

  always_comb begin
    s = a[7:4] ^ a[3:0];
    d = gf16_mul(a[7:4], a[3:0], N) ^ gf16_mul(gf16_mul(s, s, N), NU, N);
  end

  gf16_inv #(.N(N)) u_sub_inv (.a(d), .y(t));

  assign y = {gf16_mul(t, a[3:0], N), gf16_mul(t, a[7:4], N)};
endmodule
