// tb_gf2m_acc: the accumulator at its default size (128 partial products of
// 128 bits) and at 16 x 16, with random and one-hot inputs. The expected sum
// is the coefficient-wise parity of all inputs.
module tb_gf2m_acc;
  import gf_ref_pkg::*;
  logic [127:0][127:0] t = '0;
  logic [127:0]        z;
  logic [15:0][15:0]   t16 = '0;
  logic [15:0]         z16;
  int checks = 0, failures = 0;

  gf2m_acc                  dut   (.t(t), .z(z));
  gf2m_acc #(.M(16), .N(16)) dut16 (.t(t16), .z(z16));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] exp;
    logic [15:0]  exp16;
    int ones;
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 128; i++)
        t[i] = (n < 128) ? ((n == i) ? 128'(rand_elem(128)) : '0) : 128'(rand_elem(128));
      for (int i = 0; i < 16; i++) t16[i] = 16'($urandom);
      #1;
      for (int b = 0; b < 128; b++) begin
        ones = 0;
        for (int i = 0; i < 128; i++) ones += int'(t[i][b]);
        exp[b] = ones[0];
      end
      for (int b = 0; b < 16; b++) begin
        ones = 0;
        for (int i = 0; i < 16; i++) ones += int'(t16[i][b]);
        exp16[b] = ones[0];
      end
      checks += 2;
      if (z !== exp) begin
        failures++;
        $display("FAIL 128x128 vector %0d: got %h expected %h", n, z, exp);
      end
      if (z16 !== exp16) begin
        failures++;
        $display("FAIL 16x16 vector %0d: got %h expected %h", n, z16, exp16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
