// tb_compute_device: end-to-end run of the compute device at reduced size.
// Five units, LANES = 2, the 7 x 7 mask, but workgroups of 2 rows x 37
// columns (37 is odd, so one lane idles in the last lane group of every
// row), two workgroups per unit, and a 16-beat burst limit so rows need
// several bursts. The host and memory side is device_harness.
module tb_compute_device;
  import ocl_pkg::*;

  localparam int unsigned N_CU = 5, LANES = 2, M = 7, GW = 37, GH = 2, MAXB = 16;

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

  compute_device #(.N_CU(N_CU), .LANES(LANES), .M(M), .GW_MAX(GW), .GH_MAX(GH),
                   .MAX_BURST(MAXB)) dut (.*);

  device_harness #(.N_CU(N_CU), .LANES(LANES), .M(M), .MAX_BURST(MAXB), .IMG_W(GW), .GH(GH),
                   .GROUPS(2), .WORDS(16384), .TIMEOUT(200000)) host (.*);
endmodule
