// gf2m_inv: inversion circuit over GF(2^m), y = x^(2^m - 2).
// Since x^(2^m - 1) = 1 for every nonzero x, x^(2^m - 2) is the inverse of x;
// x = 0 gives y = 0. The exponent 2^m - 2 = 2 + 4 + ... + 2^(m-1), so
//   y = x^2 * x^4 * ... * x^(2^(m-1)).
// A chain of M-1 squaring circuits produces x^2 .. x^(2^(m-1)) and a chain of
// M-2 parallel multipliers forms their product. For the default GF(2^8)
// (AES polynomial) that is 7 squarers and 6 multipliers. The multiplier chain
// (rather than a tree) is this implementation's choice.
// Purely combinational.
module gf2m_inv #(
  parameter int unsigned   M  = 8,
  parameter gf_pkg::poly_t IP = gf_pkg::typical_ip(M)
) (
  input  logic [M-1:0] x,
  output logic [M-1:0] y
);
  logic [M-1:0] sq [M];   // sq[k] = x^(2^k)
  logic [M-1:0] pr [M];   // pr[k] = x^(2 + 4 + ... + 2^k), k >= 1

  if (M < 2) begin : g_bad_m
    $error("gf2m_inv: M must be at least 2");
  end

  assign sq[0] = x;
  assign pr[0] = '0;       // unused
  for (genvar k = 1; k < M; k++) begin : g_sq
    gf2m_sqr #(.M(M), .IP(IP)) u_sqr (.x(sq[k-1]), .s(sq[k]));
  end

  assign pr[1] = sq[1];
  for (genvar k = 2; k < M; k++) begin : g_mul
    gf2m_mul #(.M(M), .IP(IP)) u_mul (.x(pr[k-1]), .y(sq[k]), .z(pr[k]));
  end

  assign y = pr[M-1];
endmodule
