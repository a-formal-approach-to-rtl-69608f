// tb_gf2_mul: exhaustive check of the GF(2) multiplier against the GF(2)
// multiplication table (0*0 = 0*1 = 1*0 = 0, 1*1 = 1).
module tb_gf2_mul;
  logic a = 1'b0, b = 1'b0, z;
  int checks = 0, failures = 0;

  gf2_mul dut (.a(a), .b(b), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (z !== (i == 3)) begin
        failures++;
        $display("FAIL %0d*%0d gave %0d", a, b, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
