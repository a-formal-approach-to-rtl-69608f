// gf2m_add: adder over GF(2^m) (the "GFA" node of the multiplier).
// Addition of two field elements in the polynomial basis is coefficient-wise
// addition over GF(2), so the adder is M independent GF(2) adders, one per
// degree: z_i = t0_i + t1_i. It does not depend on the irreducible polynomial.
// Purely combinational; M is the extension degree (128 by default, the
// largest field of the multiplier family).
module gf2m_add #(
  parameter int unsigned M = 128
) (
  input  logic [M-1:0] t0,
  input  logic [M-1:0] t1,
  output logic [M-1:0] z
);
  for (genvar i = 0; i < M; i++) begin : g_bit
    gf2_add u_add (.a(t0[i]), .b(t1[i]), .z(z[i]));
  end
endmodule
