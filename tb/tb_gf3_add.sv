// tb_gf3_add: all nine pairs of GF(3) operands. Operands are encoded
// 0 -> 00, 1 -> 01, 2 -> 10; the result is decoded the same way and compared
// with (x + y) mod 3 in integer arithmetic.
module tb_gf3_add;
  logic [1:0] x = '0, y = '0, z;
  int checks = 0, failures = 0;

  gf3_add dut (.x(x), .y(y), .z(z));

  function automatic logic [1:0] enc(input int v);
    return (v == 0) ? 2'b00 : (v == 1) ? 2'b01 : 2'b10;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 3; a++) begin
      for (int b = 0; b < 3; b++) begin
        x = enc(a);
        y = enc(b);
        #1;
        checks++;
        if (z !== enc((a + b) % 3)) begin
          failures++;
          $display("FAIL %0d + %0d gave code %b", a, b, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
