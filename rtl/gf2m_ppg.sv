// gf2m_ppg: partial product generator of the GF(2^m) parallel multiplier.
// It holds M independent rows PPG_0 .. PPG_(M-1); row i produces
//   t[i] = x * y_i * beta^i  mod IP
// so that the sum of all rows is x*y. Each row sees the whole operand x and
// one coefficient of y (see gf2m_ppg_row). The reduction table the rows
// share is worked out once here. Purely combinational.
module gf2m_ppg #(
  parameter int unsigned   M  = 128,
  parameter gf_pkg::poly_t IP = gf_pkg::typical_ip(M)
) (
  input  logic [M-1:0]        x,
  input  logic [M-1:0]        y,
  output logic [M-1:0][M-1:0] t     // t[i] = partial product of row i
);
  // reduction table beta^(M+e) mod IP, shared by all rows
  localparam gf_pkg::polyvec_t HC = gf_pkg::high_cols(M, IP);

  for (genvar i = 0; i < M; i++) begin : g_row
    gf2m_ppg_row #(.M(M), .IP(IP), .I(i), .HC(HC)) u_row (.x(x), .yi(y[i]), .t(t[i]));
  end
endmodule
