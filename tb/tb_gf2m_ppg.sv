// tb_gf2m_ppg: the partial product generator over GF(2^8) (AES polynomial),
// every operand pair, and at its default size GF(2^128) with random
// operands. Each row t[i] must equal x * (y_i beta^i) mod IP, and the
// rows together must add up to the product x * y.
module tb_gf2m_ppg;
  import gf_ref_pkg::*;
  localparam rpoly_t IP8   = rpoly_t'(9'h11b);
  localparam rpoly_t IP128 = (rpoly_t'(1) << 128) | rpoly_t'(8'h87);

  logic [7:0]   x8 = '0, y8 = '0;
  logic [7:0][7:0] t8;
  logic [127:0] x128 = '0, y128 = '0;
  logic [127:0][127:0] t128;
  int checks = 0, failures = 0;

  gf2m_ppg #(.M(8), .IP(IP8)) dut8   (.x(x8), .y(y8), .t(t8));
  gf2m_ppg                    dut128 (.x(x128), .y(y128), .t(t128));

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
    rpoly_t sum, xr, yr;
    rpoly_t bp8 [8];
    for (int i = 0; i < 8; i++) bp8[i] = ref_beta_pow(8, IP8, i);
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v);
      #1;
      sum = '0;
      for (int i = 0; i < 8; i++) begin
        sum = sum ^ rpoly_t'(t8[i]);
        if (v % 64 == 0)
          check($sformatf("m=8 row %0d", i), rpoly_t'(t8[i]),
                y8[i] ? ref_mul(8, IP8, rpoly_t'(x8), bp8[i]) : '0);
      end
      check("m=8 sum", sum, ref_mul(8, IP8, rpoly_t'(x8), rpoly_t'(y8)));
    end
    for (int n = 0; n < 30; n++) begin
      xr = rand_elem(128);
      yr = rand_elem(128);
      x128 = 128'(xr);
      y128 = 128'(yr);
      #1;
      sum = '0;
      for (int i = 0; i < 128; i++) begin
        sum = sum ^ rpoly_t'(t128[i]);
        check($sformatf("m=128 row %0d", i), rpoly_t'(t128[i]),
              yr[i] ? ref_mul(128, IP128, xr, rpoly_t'(1) << i) : '0);
      end
      check("m=128 sum", sum, ref_mul(128, IP128, xr, yr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
