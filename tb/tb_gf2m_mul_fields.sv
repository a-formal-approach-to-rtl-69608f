// tb_gf2m_mul_fields: the family of parallel multipliers the design is built
// for, one instance per field, each checked with random and corner operands
// against the bit-serial reference:
//   - GF(2^m) for m = 4, 8, 16, 32, 64, 128 with the default polynomial of
//     each degree (gf_pkg::typical_ip);
//   - GF(2^31) with ten different irreducible polynomials (trinomials,
//     pentanomials), whose differing reduction networks change the circuit.
module tb_gf2m_mul_fields;
  import gf_ref_pkg::*;

  localparam int NS = 6;
  localparam int SIZES [NS] = '{4, 8, 16, 32, 64, 128};
  // expected default polynomials, terms below beta^m as a bitmask
  localparam logic [127:0] LOW [NS] = '{128'h3, 128'h1b, 128'h1002b, 128'h8d, 128'h1b, 128'h87};
  localparam int NP = 10;
  // exponents below 31 of each GF(2^31) polynomial, as a bitmask
  localparam logic [30:0] P31 [NP] = '{
    31'((1 << 3) | 1),
    31'((1 << 6) | 1),
    31'((1 << 7) | 1),
    31'((1 << 13) | 1),
    31'((1 << 23) | (1 << 15) | (1 << 7) | 1),
    31'((1 << 25) | (1 << 19) | (1 << 13) | 1),
    31'((1 << 3) | (1 << 2) | (1 << 1) | 1),
    31'((1 << 6) | (1 << 4) | (1 << 2) | 1),
    31'((1 << 13) | (1 << 8) | (1 << 3) | 1),
    31'((1 << 15) | (1 << 14) | (1 << 13) | 1)
  };

  logic [127:0] xs [NS];
  logic [127:0] ys [NS];
  logic [127:0] zs [NS];
  logic [30:0]  x31 = '0, y31 = '0;
  logic [30:0]  z31 [NP];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < NS; s++) begin : g_size
    localparam int M = SIZES[s];
    gf2m_mul #(.M(M)) dut (.x(xs[s][M-1:0]), .y(ys[s][M-1:0]), .z(zs[s][M-1:0]));
    if (M < 128) begin : g_pad
      assign zs[s][127:M] = '0;
    end
  end

  for (genvar p = 0; p < NP; p++) begin : g_poly
    gf2m_mul #(.M(31), .IP(gf_pkg::poly_t'({1'b1, P31[p]}))) dut (.x(x31), .y(y31), .z(z31[p]));
  end

  task automatic check(input string what, input rpoly_t got, input rpoly_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rpoly_t a, b, ip;
    for (int s = 0; s < NS; s++) begin
      xs[s] = '0;
      ys[s] = '0;
    end
    for (int n = 0; n < 300; n++) begin
      for (int s = 0; s < NS; s++) begin
        a = (n == 0) ? ((rpoly_t'(1) << SIZES[s]) - 1) : rand_elem(SIZES[s]);
        b = (n == 0) ? ((rpoly_t'(1) << SIZES[s]) - 1) : rand_elem(SIZES[s]);
        xs[s] = 128'(a);
        ys[s] = 128'(b);
      end
      a = (n == 1) ? (rpoly_t'(1) << 30) : rand_elem(31);
      b = (n == 1) ? (rpoly_t'(1) << 30) : rand_elem(31);
      x31 = 31'(a);
      y31 = 31'(b);
      #1;
      for (int s = 0; s < NS; s++) begin
        ip = poly_of(SIZES[s], LOW[s]);
        check($sformatf("GF(2^%0d)", SIZES[s]), rpoly_t'(zs[s]),
              ref_mul(SIZES[s], ip, rpoly_t'(xs[s]), rpoly_t'(ys[s])));
      end
      for (int p = 0; p < NP; p++) begin
        ip = poly_of(31, 128'(P31[p]));
        check($sformatf("GF(2^31) polynomial %0d", p), rpoly_t'(z31[p]), ref_mul(31, ip, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
