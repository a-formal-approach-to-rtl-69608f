// tb_gf2m_inv: the inversion circuit over GF(2^8) (AES polynomial) and over
// GF(2^4), every input. For x != 0 the result must satisfy x * y = 1 under
// the reference multiplier; 0 must map to 0. Two published AES values are
// checked too: 0x53 and 0xCA are each other's inverse.
module tb_gf2m_inv;
  import gf_ref_pkg::*;
  localparam rpoly_t IP8 = rpoly_t'(9'h11b);
  localparam rpoly_t IP4 = rpoly_t'(5'b10011);

  logic [7:0] x8 = '0, y8;
  logic [3:0] x4 = '0, y4;
  int checks = 0, failures = 0;

  gf2m_inv                    dut8 (.x(x8), .y(y8));
  gf2m_inv #(.M(4), .IP(IP4)) dut4 (.x(x4), .y(y4));

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
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      #1;
      if (v == 0) check("GF(2^8) inv(0)", rpoly_t'(y8), '0);
      else check($sformatf("GF(2^8) %h*inv", x8), ref_mul(8, IP8, rpoly_t'(x8), rpoly_t'(y8)), rpoly_t'(1));
      if (v == 'h53) check("GF(2^8) inv(53)", rpoly_t'(y8), rpoly_t'(8'hca));
      if (v == 'hca) check("GF(2^8) inv(ca)", rpoly_t'(y8), rpoly_t'(8'h53));
    end
    for (int v = 0; v < 16; v++) begin
      x4 = 4'(v);
      #1;
      if (v == 0) check("GF(2^4) inv(0)", rpoly_t'(y4), '0);
      else check($sformatf("GF(2^4) %h*inv", x4), ref_mul(4, IP4, rpoly_t'(x4), rpoly_t'(y4)), rpoly_t'(1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
