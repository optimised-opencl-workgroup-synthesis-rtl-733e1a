// conv_pe: one processing element of the image-convolution compute unit.
//
// A PE carries one work-item of the kernel
//     sum = 0; for l, for k: sum += Mask[l][k] * In[...]; Out = sum;
// It takes one (coefficient, pixel) pair per clock, multiplies them
// (fp_mul), and adds the rounded product to its running sum (fp_add), both
// in binary32 and in exactly the kernel's order, so its results match a
// sequential single-precision run of the kernel bit for bit. The first term
// of a work-item is added to +0, as "sum = 0" in the kernel; the last term
// makes the finished sum appear on out_sum with out_valid high for one clock.
//
// Timing: a pair presented with in_valid at edge n is accumulated at edge n;
// when in_last was set, out_valid/out_sum are valid after that edge (one
// clock after the last pair). The multiply and add are one combinational
// path, which keeps the loop-carried sum at one term per clock without
// interleaving several work-items; this is this design's choice.
module conv_pe
  import ocl_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_first,
  input  logic in_last,
  input  f32_t coef,
  input  f32_t pixel,
  output logic out_valid,
  output f32_t out_sum
);

  f32_t prod, acc_in, acc_next, acc;

  fp_mul u_mul (.a(coef), .b(pixel), .y(prod));
  fp_add u_add (.a(acc_in), .b(prod), .y(acc_next));

  assign acc_in = in_first ? '0 : acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid & in_last;
      if (in_valid) acc <= acc_next;
    end
  end

  assign out_sum = acc;

endmodule
