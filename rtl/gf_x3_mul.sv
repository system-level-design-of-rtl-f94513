// gf_x3_mul -- combinational multiply-by-x^3 in GF(2^M), polynomial basis.
//
// Computes C(x) = x^3 * A(x) mod P(x) in one pass of XOR trees. Because the
// reduction polynomial is a trinomial or pentanomial with p[M-1] = p[M-2] = 0,
// the three bits shifted out of the top (a[M-3], a[M-2], a[M-1]) can each be
// folded back with one copy of the low part of P and no second reduction:
//   c[0]   = a[M-3]p[0]
//   c[1]   = a[M-3]p[1] ^ a[M-2]p[0]
//   c[2]   = a[M-3]p[2] ^ a[M-2]p[1] ^ a[M-1]p[0]
//   c[i]   = a[i-3] ^ a[M-3]p[i] ^ a[M-2]p[i-1] ^ a[M-1]p[i-2]     (3 <= i < M)
// This is the x^3-multiplying cell array that steps the A operand of the
// three-bits-per-cycle serial multiplier. The equations follow the source article;
// the vector form below is this design's.
//
// Interface: a (M bits), p (the M low coefficients of P, i.e. P without its
// x^M term), c = x^3*a mod P. Purely combinational.
module gf_x3_mul #(
  parameter int unsigned M = 193
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] p,
  output logic [M-1:0] c
);
  always_comb begin
    // shift by three, then fold the three overflow bits back through P
    c = {a[M-4:0], 3'b000};
    if (a[M-3]) c ^= p;
    if (a[M-2]) c ^= {p[M-2:0], 1'b0};
    if (a[M-1]) c ^= {p[M-3:0], 2'b00};
  end
endmodule
