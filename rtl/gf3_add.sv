// gf3_add: adder over the prime field GF(3), z = x + y mod 3, as a gate
// network of four OR and three XOR gates.
//
// Each GF(3) value travels as two logic bits {L1, L0} in standard binary:
// 0 -> 00, 1 -> 01, 2 -> 10; the code 11 is never used. With that encoding
//   w0 = x_L1 | y_L1      w1 = x_L1 | y_L0
//   w2 = x_L0 | y_L1      w3 = x_L0 | y_L0
//   w4 = w1 ^ w2
//   z_L0 = w0 ^ w4        z_L1 = w3 ^ w4
// gives the sum modulo 3 for all nine legal input pairs. The gate network is
// the one the design specifies; the assertion that the unused code 11 never
// arrives is this implementation's addition. Purely combinational.
module gf3_add (
  input  logic [1:0] x,    // {x_L1, x_L0}
  input  logic [1:0] y,    // {y_L1, y_L0}
  output logic [1:0] z     // {z_L1, z_L0}
);
  logic [4:0] w;

  assign w[0] = x[1] | y[1];
  assign w[1] = x[1] | y[0];
  assign w[2] = x[0] | y[1];
  assign w[3] = x[0] | y[0];
  assign w[4] = w[1] ^ w[2];
  assign z[0] = w[0] ^ w[4];
  assign z[1] = w[3] ^ w[4];

  always_comb begin
    assert (x != 2'b11 && y != 2'b11)
      else $error("gf3_add: operand uses the unused code 11");
  end
endmodule
