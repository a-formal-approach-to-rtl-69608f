// tb_gf2m_ppg_row: single partial-product rows t_i = x * y_i * beta^i mod IP,
// for several row indices and fields, including the default (m = 128, row 0)
// and rows whose products wrap past degree m-1 and must be reduced.
module tb_gf2m_ppg_row;
  import gf_ref_pkg::*;
  localparam rpoly_t IP2   = rpoly_t'(7);        // beta^2 + beta + 1
  localparam rpoly_t IP8   = rpoly_t'(9'h11b);
  localparam rpoly_t IP128 = (rpoly_t'(1) << 128) | rpoly_t'(8'h87);

  logic [127:0] x128 = '0;  logic y128 = 1'b0;
  logic [127:0] t128_0, t128_100, t128_127;
  logic [7:0]   x8 = '0;    logic y8 = 1'b0;
  logic [7:0]   t8_3, t8_7;
  logic [1:0]   x2 = '0;    logic y2 = 1'b0;
  logic [1:0]   t2_1;
  int checks = 0, failures = 0;

  gf2m_ppg_row                                    r128_0   (.x(x128), .yi(y128), .t(t128_0));
  gf2m_ppg_row #(.M(128), .IP(IP128), .I(100))    r128_100 (.x(x128), .yi(y128), .t(t128_100));
  gf2m_ppg_row #(.M(128), .IP(IP128), .I(127))    r128_127 (.x(x128), .yi(y128), .t(t128_127));
  gf2m_ppg_row #(.M(8), .IP(IP8), .I(3))          r8_3     (.x(x8), .yi(y8), .t(t8_3));
  gf2m_ppg_row #(.M(8), .IP(IP8), .I(7))          r8_7     (.x(x8), .yi(y8), .t(t8_7));
  gf2m_ppg_row #(.M(2), .IP(IP2), .I(1))          r2_1     (.x(x2), .yi(y2), .t(t2_1));

  task automatic check(input string what, input rpoly_t got, input rpoly_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rpoly_t xr, yb;
    // GF(2^2), row 1: every input
    for (int i = 0; i < 8; i++) begin
      {y2, x2} = 3'(i);
      #1;
      yb = y2 ? rpoly_t'(2) : '0;
      check("m=2 row1", rpoly_t'(t2_1), ref_mul(2, IP2, rpoly_t'(x2), yb));
    end
    // GF(2^8), rows 3 and 7: every input
    for (int i = 0; i < 512; i++) begin
      {y8, x8} = 9'(i);
      #1;
      check("m=8 row3", rpoly_t'(t8_3), y8 ? ref_mul(8, IP8, rpoly_t'(x8), ref_beta_pow(8, IP8, 3)) : '0);
      check("m=8 row7", rpoly_t'(t8_7), y8 ? ref_mul(8, IP8, rpoly_t'(x8), ref_beta_pow(8, IP8, 7)) : '0);
    end
    // GF(2^128), rows 0, 100, 127: random operands
    for (int n = 0; n < 200; n++) begin
      xr = (n == 0) ? ((rpoly_t'(1) << 128) - 1) : rand_elem(128);
      x128 = 128'(xr);
      y128 = (n % 4 != 3);
      #1;
      check("m=128 row0",   rpoly_t'(t128_0),   y128 ? xr : '0);
      check("m=128 row100", rpoly_t'(t128_100), y128 ? ref_mul(128, IP128, xr, rpoly_t'(1) << 100) : '0);
      check("m=128 row127", rpoly_t'(t128_127), y128 ? ref_mul(128, IP128, xr, rpoly_t'(1) << 127) : '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
