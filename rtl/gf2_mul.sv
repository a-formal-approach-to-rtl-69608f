// gf2_mul: multiplier over GF(2), the lowest-level node of the GF(2^m)
// parallel multiplier. Over GF(2) the product u*v is the logic AND, the
// pseudo-logic equation AND(u,v) = uv. Purely combinational.
module gf2_mul (
  input  logic a,
  input  logic b,
  output logic z
);
  assign z = a & b;
endmodule
