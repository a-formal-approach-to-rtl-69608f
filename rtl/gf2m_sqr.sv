// gf2m_sqr: squaring circuit over GF(2^m), s = x^2 mod IP.
// Squaring is linear over GF(2): x^2 = sum_k x_k beta^(2k). Bit x_k with
// 2k < M lands on bit 2k unchanged; bit x_k with 2k >= M is replaced by the
// remainder beta^(2k) mod IP from the reduction table. Bit j of the result
// is therefore the XOR of a fixed set of input bits, worked out from IP at
// elaboration time: the circuit is an XOR network with no AND gates.
// Purely combinational. Default field: GF(2^8) with the AES polynomial, the
// field of the inverter that uses this circuit.
module gf2m_sqr #(
  parameter int unsigned   M  = 8,
  parameter gf_pkg::poly_t IP = gf_pkg::typical_ip(M)
) (
  input  logic [M-1:0] x,
  output logic [M-1:0] s
);
  // bit e of HC[j]: coefficient of beta^j in beta^(M+e) mod IP
  localparam gf_pkg::polyvec_t HC = gf_pkg::high_cols(M, IP);

  for (genvar j = 0; j < M; j++) begin : g_col
    logic [M-1:0] sel;    // which x_k feed output bit j
    for (genvar k = 0; k < M; k++) begin : g_k
      if (2 * k < M) begin : g_low
        assign sel[k] = (2 * k == j) ? x[k] : 1'b0;
      end else begin : g_high
        assign sel[k] = HC[j][2*k-M] ? x[k] : 1'b0;
      end
    end
    assign s[j] = ^sel;
  end
endmodule
