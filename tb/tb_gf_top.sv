// tb_gf_top: end-to-end test of the whole design at its default parameters
// (GF(2^128) multiplier, GF(2^8) inverter, GF(3) adder), no overrides.
//   - multiplier: random and corner operand pairs against a bit-serial
//     reference; counts how many products needed reduction by the
//     irreducible polynomial and how many did not;
//   - inverter: every input, x * inv(x) = 1 and inv(0) = 0, and each
//     inverse fed back through the GF(2^128) multiplier port as well;
//   - GF(3) adder: all nine operand pairs; counts sums that wrap modulo 3.
// Every one of these cases must occur at least once.
module tb_gf_top;
  import gf_ref_pkg::*;
  localparam rpoly_t IP128 = (rpoly_t'(1) << 128) | rpoly_t'(8'h87);
  localparam rpoly_t IP8   = rpoly_t'(9'h11b);

  logic [127:0] mul_x = '0, mul_y = '0, mul_z;
  logic [7:0]   inv_x = '0, inv_y;
  logic [1:0]   gf3_x = '0, gf3_y = '0, gf3_z;
  int checks = 0, failures = 0;
  int n_reduced = 0, n_unreduced = 0, n_inv_zero = 0, n_inv_nonzero = 0;
  int n_gf3_wrap = 0, n_gf3_nowrap = 0;

  gf_top dut (
    .mul_x(mul_x), .mul_y(mul_y), .mul_z(mul_z),
    .inv_x(inv_x), .inv_y(inv_y),
    .gf3_x(gf3_x), .gf3_y(gf3_y), .gf3_z(gf3_z)
  );

  task automatic check(input string what, input rpoly_t got, input rpoly_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic seen(input string what, input int n);
    checks++;
    $display("%s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  function automatic logic [1:0] enc3(input int v);
    return (v == 0) ? 2'b00 : (v == 1) ? 2'b01 : 2'b10;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rpoly_t xr, yr;
    // GF(2^128) multiplier
    for (int n = 0; n < 1000; n++) begin
      case (n)
        0: begin xr = rpoly_t'(1) << 127; yr = rpoly_t'(2); end
        1: begin xr = rpoly_t'(1) << 63;  yr = rpoly_t'(1) << 64; end
        2: begin xr = '0; yr = rand_elem(128); end
        default: begin
          xr = rand_elem(128);
          yr = (n % 10 == 0) ? (rand_elem(128) & rpoly_t'(64'hffff_ffff)) : rand_elem(128);
          if (n % 10 == 0) xr = xr & rpoly_t'(64'hffff_ffff);
        end
      endcase
      mul_x = 128'(xr);
      mul_y = 128'(yr);
      #1;
      if (needs_reduction(128, xr, yr)) n_reduced++;
      else n_unreduced++;
      check("GF(2^128) product", rpoly_t'(mul_z), ref_mul(128, IP128, xr, yr));
    end
    // GF(2^8) inverter, result cross-checked through the big multiplier too:
    // GF(2^8) values multiplied in GF(2^128) do not reach degree 128, so the
    // product there is the plain carry-less product, reduced here by IP8.
    for (int v = 0; v < 256; v++) begin
      inv_x = 8'(v);
      #1;
      if (v == 0) begin
        n_inv_zero++;
        check("inv(0)", rpoly_t'(inv_y), '0);
      end else begin
        n_inv_nonzero++;
        check($sformatf("%h*inv(%h)", inv_x, inv_x),
              ref_mul(8, IP8, rpoly_t'(inv_x), rpoly_t'(inv_y)), rpoly_t'(1));
        mul_x = 128'(inv_x);
        mul_y = 128'(inv_y);
        #1;
        check($sformatf("clmul %h*inv(%h) mod IP8", inv_x, inv_x),
              ref_reduce(8, IP8, rpoly_t'(mul_z)), rpoly_t'(1));
      end
    end
    // GF(3) adder
    for (int a = 0; a < 3; a++) begin
      for (int b = 0; b < 3; b++) begin
        gf3_x = enc3(a);
        gf3_y = enc3(b);
        #1;
        if (a + b >= 3) n_gf3_wrap++;
        else n_gf3_nowrap++;
        check($sformatf("GF(3) %0d+%0d", a, b), rpoly_t'(gf3_z), rpoly_t'(enc3((a + b) % 3)));
      end
    end
    seen("GF(2^128) products reduced by the polynomial", n_reduced);
    seen("GF(2^128) products below degree 128", n_unreduced);
    seen("GF(2^8) inverse of zero", n_inv_zero);
    seen("GF(2^8) inverse of nonzero", n_inv_nonzero);
    seen("GF(3) sums wrapping modulo 3", n_gf3_wrap);
    seen("GF(3) sums not wrapping", n_gf3_nowrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
