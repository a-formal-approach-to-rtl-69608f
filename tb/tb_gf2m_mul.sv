// tb_gf2m_mul: the parallel multiplier at its default size GF(2^128) and at
// GF(2^2) (beta^2 + beta + 1), GF(2^4) and GF(2^8) (AES polynomial). The
// small fields are checked for every operand pair, GF(2^128) with random and
// corner operands, all against a bit-serial reference multiplication.
module tb_gf2m_mul;
  import gf_ref_pkg::*;
  localparam rpoly_t IP2   = rpoly_t'(3'b111);
  localparam rpoly_t IP4   = rpoly_t'(5'b10011);
  localparam rpoly_t IP8   = rpoly_t'(9'h11b);
  localparam rpoly_t IP128 = (rpoly_t'(1) << 128) | rpoly_t'(8'h87);

  logic [1:0]   x2 = '0, y2 = '0, z2;
  logic [3:0]   x4 = '0, y4 = '0, z4;
  logic [7:0]   x8 = '0, y8 = '0, z8;
  logic [127:0] x128 = '0, y128 = '0, z128;
  int checks = 0, failures = 0;

  gf2m_mul #(.M(2), .IP(IP2)) dut2   (.x(x2), .y(y2), .z(z2));
  gf2m_mul #(.M(4), .IP(IP4)) dut4   (.x(x4), .y(y4), .z(z4));
  gf2m_mul #(.M(8), .IP(IP8)) dut8   (.x(x8), .y(y8), .z(z8));
  gf2m_mul                    dut128 (.x(x128), .y(y128), .z(z128));

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
    rpoly_t xr, yr;
    for (int v = 0; v < 16; v++) begin
      {x2, y2} = 4'(v);
      #1;
      check($sformatf("GF(2^2) %0d*%0d", x2, y2), rpoly_t'(z2), ref_mul(2, IP2, rpoly_t'(x2), rpoly_t'(y2)));
    end
    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v);
      #1;
      check($sformatf("GF(2^4) %h*%h", x4, y4), rpoly_t'(z4), ref_mul(4, IP4, rpoly_t'(x4), rpoly_t'(y4)));
    end
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v);
      #1;
      check($sformatf("GF(2^8) %h*%h", x8, y8), rpoly_t'(z8), ref_mul(8, IP8, rpoly_t'(x8), rpoly_t'(y8)));
    end
    // known values: beta^127 * beta = beta^128 = beta^7 + beta^2 + beta + 1
    x128 = 128'(1) << 127; y128 = 128'(2);
    #1;
    check("GF(2^128) beta^127*beta", rpoly_t'(z128), rpoly_t'(8'h87));
    for (int n = 0; n < 2000; n++) begin
      xr = (n == 0) ? ((rpoly_t'(1) << 128) - 1) : rand_elem(128);
      yr = (n == 0) ? ((rpoly_t'(1) << 128) - 1) : (n == 1) ? rpoly_t'(1) : rand_elem(128);
      x128 = 128'(xr);
      y128 = 128'(yr);
      #1;
      check("GF(2^128) random", rpoly_t'(z128), ref_mul(128, IP128, xr, yr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
