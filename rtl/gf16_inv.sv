// gf16_inv: inverter of GF(2^4) in a normal-basis tower GF(2^4)/GF(2^2).
//
// The 4-bit input a = {a1, a0} stands for a1*Z^4 + a0*Z, each half an element
// of GF(2^2) in the normal basis [W^2, W]. With unit trace (Z^4 + Z = 1) and
// norm N = Z^5, the inverse is
//     d = a1*a0 + N*(a1 + a0)^2,   a^-1 = (d^-1 * a0)*Z^4 + (d^-1 * a1)*Z,
// where d^-1 in GF(2^2) is just a swap of its two bits. Zero maps to zero.
// The tower and the unit-trace normal basis follow the source design; the
// gate-level netlist is this design's own direct rendering of the formula,
// not a hand-minimised one. Purely combinational.
//
// Parameter N: the GF(2^4)/GF(2^2) norm in [W^2, W] coordinates
// (2'b01 for encryption basis #127, 2'b10 for decryption basis #94).
module gf16_inv
  import aes_tower_pkg::*;
#(
  parameter logic [1:0] N = N127
) (
  input  logic [3:0] a,
  output logic [3:0] y
);
  logic [1:0] s, d, t;

  always_comb begin
    s = a[3:2] ^ a[1:0];
    d = gf4_mul(a[3:2], a[1:0]) ^ gf4_mul(gf4_sq(s), N);
    t = gf4_sq(d);  // inverse in GF(2^2)
    y = {gf4_mul(t, a[1:0]), gf4_mul(t, a[3:2])};
  end
endmodule
