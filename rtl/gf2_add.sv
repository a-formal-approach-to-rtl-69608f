// gf2_add: adder over GF(2), the lowest-level node of the GF(2^m) adders.
// Addition modulo 2 is the logic XOR, XOR(u,v) = u + v - 2uv.
// Purely combinational.
module gf2_add (
  input  logic a,
  input  logic b,
  output logic z
);
  assign z = a ^ b;
endmodule
