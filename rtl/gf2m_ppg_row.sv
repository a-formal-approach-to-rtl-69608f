// gf2m_ppg_row: one row PPG_i of the partial product generator of the
// GF(2^m) parallel multiplier. It computes the partial product
//   t_i = x * (y_i beta^i)  mod IP
// where y_i is coefficient i of the multiplier operand y.
//
// The row first forms the M GF(2) products a_k = x_k * y_i (AND gates), then
// folds them into the field. Product a_k belongs to beta^(k+i). Where
// k+i < M it lands on bit k+i unchanged; where k+i >= M it is replaced by the
// remainder beta^(k+i) mod IP, read from the reduction table HC. Bit j of t_i
// is therefore the GF(2) sum (XOR) of a fixed set of the a_k: a_(j-i) when
// j >= i, plus every a_k whose remainder has a 1 in position j. The sets are
// constants derived from IP, so the row is a fixed AND/XOR network. Row 0
// needs no reduction: t_0 = x * y_0.
//
// Purely combinational. Parameters: M (extension degree), IP (irreducible
// polynomial, bit M set), I (row index, 0 <= I < M) and HC, the reduction
// table of gf_pkg::high_cols, which the parent computes once for all rows.
module gf2m_ppg_row #(
  parameter int unsigned      M  = 128,
  parameter gf_pkg::poly_t    IP = gf_pkg::typical_ip(M),
  parameter int unsigned      I  = 0,
  parameter gf_pkg::polyvec_t HC = gf_pkg::high_cols(M, IP)
) (
  input  logic [M-1:0] x,
  input  logic         yi,
  output logic [M-1:0] t
);
  logic [M-1:0] a;

  for (genvar k = 0; k < M; k++) begin : g_and
    gf2_mul u_mul (.a(x[k]), .b(yi), .z(a[k]));
  end

  for (genvar j = 0; j < M; j++) begin : g_col
    // a_(j-i): the unreduced term of degree j
    localparam logic [M-1:0] LOW  = (j >= I) ? (M'(1) << (j - I)) : '0;
    // a_k with k >= M-i whose beta^(k+i) mod IP has a 1 at degree j:
    // bit k of the mask is HC[j][k+i-M]
    localparam logic [M-1:0] HIGH = M'(HC[j] << (M - I));
    assign t[j] = ^(a & (LOW | HIGH));
  end
endmodule
