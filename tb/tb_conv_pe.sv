// tb_conv_pe: feeds one processing element back-to-back work-items of
// random length (1 to 49 terms, in_valid sometimes low between terms) and
// compares every finished sum with a sequential binary32 model
// (sum = 0; sum += coef * pixel, rounding after each operation). Also
// checks that out_valid comes exactly one clock after the last term.
module tb_conv_pe;
  import ocl_pkg::*;
  import tb_f32_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0, out_valid;
  f32_t coef = '0, pixel = '0, out_sum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  conv_pe dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .coef, .pixel, .out_valid, .out_sum);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f32_t expect_sum;
    int   n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int item = 0; item < 300; item++) begin
      n = $urandom_range(1, 49);
      expect_sum = '0;
      for (int t = 0; t < n; t++) begin
        // occasional idle clock between terms
        if ($urandom_range(0, 7) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        coef  = rand_f32(118, 128);
        pixel = rand_f32(118, 130);
        expect_sum = f32_add(expect_sum, f32_mul(coef, pixel));
        in_valid = 1; in_first = (t == 0); in_last = (t == n - 1);
        @(negedge clk);
        checks++;
        if (out_valid !== (t == n - 1)) begin
          failures++;
          $display("out_valid %b after term %0d of %0d", out_valid, t, n);
        end
      end
      in_valid = 0; in_first = 0; in_last = 0;
      checks++;
      if (out_sum !== expect_sum) begin
        failures++;
        if (failures < 10) $display("item %0d: sum %h, expected %h", item, out_sum, expect_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
