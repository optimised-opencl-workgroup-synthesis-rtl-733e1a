// tb_compute_unit: one compute unit against the memory model and host of
// device_harness, in a second configuration: LANES = 4, a 5 x 5 mask,
// workgroups of 3 rows x 21 columns (three lanes idle in the last lane
// group), three workgroups in a row, and an 8-beat burst limit.
module tb_compute_unit;
  import ocl_pkg::*;

  localparam int unsigned LANES = 4, M = 5, GW = 21, GH = 3, MAXB = 8;

  logic      clk, rst_n;
  logic [0:0] start, busy, done;
  cu_args_t  args [1];
  logic      mask_we;
  logic [4:0] mask_addr;
  f32_t      mask_data;
  axi_a_t axi_ar [1], axi_aw [1];
  axi_r_t axi_r [1];
  axi_w_t axi_w [1];
  axi_b_t axi_b [1];
  logic   axi_ar_ready [1], axi_r_ready [1], axi_aw_ready [1], axi_w_ready [1], axi_b_ready [1];

  compute_unit #(.LANES(LANES), .M(M), .GW_MAX(GW), .GH_MAX(GH), .MAX_BURST(MAXB)) dut (
    .clk, .rst_n, .start(start[0]), .args(args[0]), .busy(busy[0]), .done(done[0]),
    .mask_we, .mask_addr, .mask_data,
    .axi_ar(axi_ar[0]), .axi_ar_ready(axi_ar_ready[0]), .axi_r(axi_r[0]), .axi_r_ready(axi_r_ready[0]),
    .axi_aw(axi_aw[0]), .axi_aw_ready(axi_aw_ready[0]), .axi_w(axi_w[0]), .axi_w_ready(axi_w_ready[0]),
    .axi_b(axi_b[0]), .axi_b_ready(axi_b_ready[0]));

  device_harness #(.N_CU(1), .LANES(LANES), .M(M), .MAX_BURST(MAXB), .IMG_W(GW), .GH(GH),
                   .GROUPS(3), .WORDS(16384), .TIMEOUT(200000)) host (.*);
endmodule
