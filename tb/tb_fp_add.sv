// tb_fp_add: checks the binary32 adder against a reference built on the
// simulator's double-precision arithmetic (tb_f32_pkg). A sum of two
// binary32 values whose exponents differ by less than 29 is exact in double,
// so one rounding to binary32 gives the expected result. Random pairs cover
// same and opposite signs, near-cancellation (b close to -a) and large
// exponent gaps where only the sticky bit of b survives; fixed cases cover
// zeros, infinities, NaN and overflow.
module tb_fp_add;
  import ocl_pkg::*;
  import tb_f32_pkg::*;

  f32_t a, b, y;
  int   checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .y(y));

  task automatic check(input f32_t x, input f32_t z, input f32_t exp_y);
    a = x; b = z;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h + %h = %h, expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f32_t x, z;
    check(32'h3F80_0000, 32'h3F80_0000, 32'h4000_0000);   // 1+1
    check(32'h3F80_0000, 32'hBF80_0000, 32'h0000_0000);   // 1-1 = +0
    check(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);   // -0 + -0
    check(32'h0000_0000, 32'hC040_0000, 32'hC040_0000);   // 0 + -3
    check(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000);   // inf - inf
    check(32'h7F80_0000, 32'h3F80_0000, 32'h7F80_0000);
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000);   // overflow
    check(32'h3F80_0000, 32'h3380_0000, 32'h3F80_0000);   // 1 + 2^-24: tie, even
    check(32'h3F80_0001, 32'h3380_0000, 32'h3F80_0002);   // tie, round up to even
    check(32'h3F80_0000, 32'h3380_0001, 32'h3F80_0001);   // just above tie
    check(32'h3F80_0000, 32'hB380_0001, 32'h3F7F_FFFF);   // 1 - (2^-24+): borrow
    for (int n = 0; n < 30000; n++) begin
      x = rand_f32(100, 150);
      case (n % 3)
        0: z = rand_f32(100, 150);
        1: z = {~x[31], x[30:8], 8'($urandom)};          // near cancellation
        default: begin                                    // gap up to 28
          z = rand_f32(1, 254);
          z[30:23] = x[30:23] - 8'($urandom_range(0, 28));
        end
      endcase
      if (z[30:23] == 0) z[30:23] = 8'd1;
      check(x, z, f32_add(x, z));
      check(z, x, f32_add(x, z));
    end
    // very large gaps: the result is the larger operand, rounded
    for (int n = 0; n < 1000; n++) begin
      x = rand_f32(150, 200);
      z = rand_f32(60, 100);
      check(x, z, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
