// gf_top: the Galois-field circuits of this design side by side, each with
// its own ports, sharing nothing:
//   - a two-operand parallel multiplier over GF(2^MUL_M), z = x*y
//     (default GF(2^128), polynomial beta^128 + beta^7 + beta^2 + beta + 1);
//   - an inversion circuit over GF(2^INV_M), y = x^(2^m - 2), built from
//     squarers and the same parallel multiplier (default GF(2^8), AES field);
//   - an adder over GF(3) with two-bit binary-coded operands.
// All three are combinational; outputs follow inputs after one propagation
// delay, with no clock or reset.
module gf_top #(
  parameter int unsigned   MUL_M  = 128,
  parameter gf_pkg::poly_t MUL_IP = gf_pkg::typical_ip(MUL_M),
  parameter int unsigned   INV_M  = 8,
  parameter gf_pkg::poly_t INV_IP = gf_pkg::typical_ip(INV_M)
) (
  input  logic [MUL_M-1:0] mul_x,
  input  logic [MUL_M-1:0] mul_y,
  output logic [MUL_M-1:0] mul_z,
  input  logic [INV_M-1:0] inv_x,
  output logic [INV_M-1:0] inv_y,
  input  logic [1:0]       gf3_x,   // GF(3) value, 0 -> 00, 1 -> 01, 2 -> 10
  input  logic [1:0]       gf3_y,
  output logic [1:0]       gf3_z
);
  gf2m_mul #(.M(MUL_M), .IP(MUL_IP)) u_mul (.x(mul_x), .y(mul_y), .z(mul_z));
  gf2m_inv #(.M(INV_M), .IP(INV_IP)) u_inv (.x(inv_x), .y(inv_y));
  gf3_add                            u_gf3 (.x(gf3_x), .y(gf3_y), .z(gf3_z));
endmodule
