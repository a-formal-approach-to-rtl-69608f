// gf2m_acc: accumulator of the GF(2^m) parallel multiplier,
//   z = t[0] + t[1] + ... + t[N-1]  over GF(2^m).
// The N partial products are summed by N-1 GF(2^m) adders (GFA nodes) in a
// linear chain: s_0 = t[0], s_i = s_(i-1) + t[i], z = s_(N-1). A balanced
// tree would give the same function with less depth; the chain is this
// implementation's choice. Purely combinational.
module gf2m_acc #(
  parameter int unsigned M = 128,
  parameter int unsigned N = M       // number of partial products
) (
  input  logic [N-1:0][M-1:0] t,
  output logic [M-1:0]        z
);
  logic [N-1:0][M-1:0] s;

  assign s[0] = t[0];
  for (genvar i = 1; i < N; i++) begin : g_gfa
    gf2m_add #(.M(M)) u_gfa (.t0(s[i-1]), .t1(t[i]), .z(s[i]));
  end
  assign z = s[N-1];
endmodule
