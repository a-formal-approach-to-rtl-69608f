// gf2m_mul: two-operand parallel multiplier over GF(2^m), z = x * y mod IP.
//
// The multiplier is built as a hierarchy of smaller field circuits:
//   gf2m_ppg  partial product generator, rows t_i = x * y_i * beta^i mod IP
//             (each row: M GF(2) multipliers and a fixed XOR reduction network)
//   gf2m_acc  accumulator, z = sum of the M rows, M-1 GF(2^m) adders
// Every node therefore has a short field equation that its parts satisfy,
// which is what allows the circuit to be checked level by level.
//
// Purely combinational, no clock: the product is valid one propagation delay
// after the operands. M is the extension degree (default 128, the largest
// multiplier of the family); IP is the irreducible polynomial with bit M set,
// by default the usual polynomial for that degree from gf_pkg::typical_ip.
module gf2m_mul #(
  parameter int unsigned   M  = 128,
  parameter gf_pkg::poly_t IP = gf_pkg::typical_ip(M)
) (
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  output logic [M-1:0] z
);
  logic [M-1:0][M-1:0] t;

  if (!gf_pkg::ip_ok(M, IP)) begin : g_bad_ip
    $error("gf2m_mul: IP must have degree M and a constant term");
  end

  gf2m_ppg #(.M(M), .IP(IP)) u_ppg (.x(x), .y(y), .t(t));
  gf2m_acc #(.M(M), .N(M))   u_acc (.t(t), .z(z));
endmodule
