// tb_ic_hd_workload: the evaluated image-convolution workload -- a full
// 1920 x 1080 HD frame, 7 x 7 mask, five compute units -- on the device at
// its default parameters. Each unit convolves a band of 216 rows as 216
// workgroups of 1 x 1920 run back to back; every output pixel is checked
// against a sequential binary32 model. The clock counts printed per unit
// give the frame time at the 100 MHz of the reference system.
module tb_ic_hd_workload;
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
                   .GROUPS(216), .WORDS(4194304), .TIMEOUT(20000000),
                   .NEED_NEXT_GROUP(1'b1), .NEED_IDLE_LANES(1'b0)) host (.*);

  // Backstop: the harness has its own clock-count watchdog; this one also
  // ends the run, as a failure, should the harness itself never finish.
  initial begin
    #(64'd250000000);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
