// compute_device: the OpenCL compute device in the programmable logic --
// N_CU image-convolution compute units side by side, each with its own AXI4
// master port into the processing system (in the reference system HP0-HP3
// for units 0-3 and the ACP port for unit 4).
//
// The host divides the work-items of a kernel launch into workgroups small
// enough for a unit's local memories and hands each unit a list of them
// (its own args). The units then run independently and in parallel; each
// signals done when its last workgroup is back in DDR. The mask
// coefficients are the same for every unit, so one mask write port feeds
// them all.
//
// Interface: start[u], args[u], busy[u], done[u] per unit (see
// compute_unit); mask_we/mask_addr/mask_data broadcast; axi_*[u] is unit
// u's AXI4 master. No arbitration is needed inside the device because no
// two units share a port.
//
// From the source: up to five compute units, one port each (four HP ports
// and the ACP), LANES = 2 processing elements per unit, the 7 x 7 mask, the
// 1 x 1920 workgroup. This design's own: the per-unit start/args ports.
module compute_device
  import ocl_pkg::*;
#(
  parameter int unsigned N_CU      = 5,
  parameter int unsigned LANES     = 2,
  parameter int unsigned M         = 7,
  parameter int unsigned GW_MAX    = 1920,
  parameter int unsigned GH_MAX    = 1,
  parameter int unsigned MAX_BURST = AXI_MAX_BURST,
  localparam int unsigned MAW = $clog2(M * M)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CU-1:0] start,
  input  cu_args_t        args         [N_CU],
  output logic [N_CU-1:0] busy,
  output logic [N_CU-1:0] done,
  input  logic            mask_we,
  input  logic [MAW-1:0]  mask_addr,
  input  f32_t            mask_data,
  // one AXI4 master per compute unit
  output axi_a_t          axi_ar       [N_CU],
  input  logic            axi_ar_ready [N_CU],
  input  axi_r_t          axi_r        [N_CU],
  output logic            axi_r_ready  [N_CU],
  output axi_a_t          axi_aw       [N_CU],
  input  logic            axi_aw_ready [N_CU],
  output axi_w_t          axi_w        [N_CU],
  input  logic            axi_w_ready  [N_CU],
  input  axi_b_t          axi_b        [N_CU],
  output logic            axi_b_ready  [N_CU]
);

  for (genvar u = 0; u < N_CU; u++) begin : g_cu
    compute_unit #(
      .LANES(LANES), .M(M), .GW_MAX(GW_MAX), .GH_MAX(GH_MAX), .MAX_BURST(MAX_BURST)
    ) u_cu (
      .clk, .rst_n,
      .start       (start[u]),
      .args        (args[u]),
      .busy        (busy[u]),
      .done        (done[u]),
      .mask_we, .mask_addr, .mask_data,
      .axi_ar      (axi_ar[u]),
      .axi_ar_ready(axi_ar_ready[u]),
      .axi_r       (axi_r[u]),
      .axi_r_ready (axi_r_ready[u]),
      .axi_aw      (axi_aw[u]),
      .axi_aw_ready(axi_aw_ready[u]),
      .axi_w       (axi_w[u]),
      .axi_w_ready (axi_w_ready[u]),
      .axi_b       (axi_b[u]),
      .axi_b_ready (axi_b_ready[u])
    );
  end

endmodule
