// tb_fp_mul: checks the binary32 multiplier against a reference built on
// the simulator's double-precision arithmetic (tb_f32_pkg). The product of
// two binary32 values is exact in double precision, so rounding it once to
// binary32 gives the expected, correctly rounded result. Operands keep their exponents in a
// range whose products stay normal (the multiplier flushes subnormals).
// A handful of special cases (zeros, infinities, NaN, overflow) are
// checked against fixed values.
module tb_fp_mul;
  import ocl_pkg::*;
  import tb_f32_pkg::*;

  f32_t a, b, y;
  int   checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));


  task automatic check(input f32_t x, input f32_t z, input f32_t exp_y);
    a = x; b = z;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h * %h = %h, expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f32_t x, z;
    // special values
    check(32'h3F80_0000, 32'h4000_0000, 32'h4000_0000);   // 1*2
    check(32'h0000_0000, 32'h4000_0000, 32'h0000_0000);
    check(32'h8000_0000, 32'h4000_0000, 32'h8000_0000);
    check(32'h7F80_0000, 32'hC000_0000, 32'hFF80_0000);   // inf*-2
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);   // inf*0
    check(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000);   // NaN
    check(32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);   // overflow
    check(32'h0080_0000, 32'h0080_0000, 32'h0000_0000);   // underflow
    check(32'h3F80_0001, 32'h3F80_0001, 32'h3F80_0002);   // (1+u)^2 rounds down
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF, 32'h407F_FFFE);
    for (int n = 0; n < 20000; n++) begin
      x = rand_f32(70, 184);
      z = rand_f32(70, 184);
      check(x, z, f32_mul(x, z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
