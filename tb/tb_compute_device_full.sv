// tb_compute_device_full: one complete kernel launch on the compute device
// with every parameter at its default: five units, each convolving one
// 1920-pixel image row (one 1 x 1920 workgroup) with a 7 x 7 mask. The
// output rows are checked against a sequential binary32 model. With one
// workgroup per unit of even width, the "next workgroup" and "idle lane"
// mechanisms are not expected here; tb_compute_device covers them.
module tb_compute_device_full;
  import ocl_pkg::*;

  localparam int unsigned N_CU = 5;

  logic            clk, rst_n;
  logic [N_CU-1:0] start, busy, done;
  cu_args_t        args [N_CU];
  logic            mask_we;
  logic [5:0]      mask_addr;
  f32_t            mask_data;
  axi_a_t axi_ar [N_CU], axi_aw [N_CU];
  axi_r_t axi_r [N_CU];
  axi_w_t axi_w [N_CU];
  axi_b_t axi_b [N_CU];
  logic   axi_ar_ready [N_CU], axi_r_ready [N_CU], axi_aw_ready [N_CU];
  logic   axi_w_ready [N_CU], axi_b_ready [N_CU];

  compute_device dut (.*);

  device_harness #(.N_CU(N_CU), .LANES(2), .M(7), .MAX_BURST(256), .IMG_W(1920), .GH(1),
                   .GROUPS(1), .WORDS(65536), .TIMEOUT(400000),
                   .NEED_NEXT_GROUP(1'b0), .NEED_IDLE_LANES(1'b0)) host (.*);
endmodule
