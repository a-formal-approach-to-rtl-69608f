// tb_gf2m_sqr: the squaring circuit at its default GF(2^8) (AES polynomial)
// for every input, and at GF(2^128) and GF(2^31) with random inputs, against
// x * x from the reference multiplier.
module tb_gf2m_sqr;
  import gf_ref_pkg::*;
  localparam rpoly_t IP31  = rpoly_t'(32'h8000_0009);
  localparam rpoly_t IP128 = (rpoly_t'(1) << 128) | rpoly_t'(8'h87);

  logic [7:0]   x8 = '0, s8;
  logic [30:0]  x31 = '0, s31;
  logic [127:0] x128 = '0, s128;
  int checks = 0, failures = 0;

  gf2m_sqr                         dut8   (.x(x8), .s(s8));
  gf2m_sqr #(.M(31), .IP(IP31))    dut31  (.x(x31), .s(s31));
  gf2m_sqr #(.M(128), .IP(IP128))  dut128 (.x(x128), .s(s128));

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
    rpoly_t a, b;
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      #1;
      check($sformatf("GF(2^8) %h^2", x8), rpoly_t'(s8), ref_mul(8, rpoly_t'(9'h11b), rpoly_t'(x8), rpoly_t'(x8)));
    end
    for (int n = 0; n < 500; n++) begin
      a = rand_elem(31);
      b = rand_elem(128);
      x31 = 31'(a);
      x128 = 128'(b);
      #1;
      check("GF(2^31) square", rpoly_t'(s31), ref_mul(31, IP31, a, a));
      check("GF(2^128) square", rpoly_t'(s128), ref_mul(128, IP128, b, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
