// tb_gf2m_add: GF(2^m) adder at its default size (m = 128) and at m = 4.
// Random and corner operands; the expected sum is worked out coefficient by
// coefficient as integer addition modulo 2.
module tb_gf2m_add;
  import gf_ref_pkg::*;
  logic [127:0] a = '0, b = '0, z;
  logic [3:0]   a4 = '0, b4 = '0, z4;
  int checks = 0, failures = 0;

  gf2m_add           dut   (.t0(a), .t1(b), .z(z));
  gf2m_add #(.M(4))  dut4  (.t0(a4), .t1(b4), .z(z4));

  function automatic logic [127:0] expect_sum(input logic [127:0] p, input logic [127:0] q);
    logic [127:0] r;
    for (int i = 0; i < 128; i++) r[i] = 1'((int'(p[i]) + int'(q[i])) % 2);
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      a = 128'(rand_elem(128));
      b = (n == 0) ? a : (n == 1) ? '1 : 128'(rand_elem(128));
      #1;
      checks++;
      if (z !== expect_sum(a, b)) begin
        failures++;
        $display("FAIL m=128 %h + %h gave %h", a, b, z);
      end
    end
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      checks++;
      if (z4 !== expect_sum(128'(a4), 128'(b4))[3:0]) begin
        failures++;
        $display("FAIL m=4 %h + %h gave %h", a4, b4, z4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
