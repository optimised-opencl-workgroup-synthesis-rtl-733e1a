// device_harness: host and memory side of the compute-device testbenches.
//
// It plays the part of the processing system: an AXI memory model with one
// slave port per compute unit (random back-pressure), and a host that
// follows the driver sequence write_data -> activate -> wait -> read_data:
//   write_data  a random IMG_W x IMG_H float image, with an (M-1)/2 border
//               of zeros on every side, is placed in memory; the rest of
//               memory holds random words;
//   activate    the M x M mask is written and every unit is started with
//               its own band of rows: GROUPS workgroups of GH rows x IMG_W
//               columns, one after another;
//   wait        until every unit has signalled done (or a timeout);
//   read_data   the output image is compared with a sequential binary32
//               model of the kernel, and every other memory word must be
//               unchanged.
// It also counts how often each mechanism of the design happened: bursts
// cut by the burst-length limit, bursts cut at a 4 KB boundary, AXI stalls,
// all units busy at once, a unit moving on to its next workgroup, and
// workgroups whose width leaves some lanes idle. A mechanism that never
// happened counts as a failure. The last line printed is TB_RESULT.
module device_harness
  import ocl_pkg::*;
  import tb_f32_pkg::*;
#(
  parameter int unsigned N_CU      = 5,
  parameter int unsigned LANES     = 2,
  parameter int unsigned M         = 7,
  parameter int unsigned MAX_BURST = 256,
  parameter int unsigned IMG_W     = 1920,
  parameter int unsigned GH        = 1,
  parameter int unsigned GROUPS    = 1,
  parameter int unsigned WORDS     = 65536,
  parameter int unsigned TIMEOUT   = 2000000,
  parameter bit          NEED_NEXT_GROUP = 1'b1,
  parameter bit          NEED_IDLE_LANES = 1'b1,
  localparam int unsigned MAW = $clog2(M * M)
) (
  output logic            clk,
  output logic            rst_n,
  output logic [N_CU-1:0] start,
  output cu_args_t        args         [N_CU],
  input  logic [N_CU-1:0] busy,
  input  logic [N_CU-1:0] done,
  output logic            mask_we,
  output logic [MAW-1:0]  mask_addr,
  output f32_t            mask_data,
  input  axi_a_t          axi_ar       [N_CU],
  output logic            axi_ar_ready [N_CU],
  output axi_r_t          axi_r        [N_CU],
  input  logic            axi_r_ready  [N_CU],
  input  axi_a_t          axi_aw       [N_CU],
  output logic            axi_aw_ready [N_CU],
  input  axi_w_t          axi_w        [N_CU],
  output logic            axi_w_ready  [N_CU],
  output axi_b_t          axi_b        [N_CU],
  input  logic            axi_b_ready  [N_CU]
);

  localparam int unsigned IMG_H    = N_CU * GROUPS * GH;
  localparam int unsigned PW       = IMG_W + M - 1;           // padded width
  localparam int unsigned PH       = IMG_H + M - 1;           // padded height
  localparam int unsigned IMG_BASE = 32'hE00;                 // bytes
  localparam int unsigned OUT_BASE = ((IMG_BASE + PW * PH * 4 + 4095) / 4096) * 4096 + 32'h80;

  int checks = 0, failures = 0;
  int n_stall = 0, n_all_busy = 0, n_next_group = 0, n_idle_lane_groups = 0;
  longint cycles = 0;

  initial begin
    assert (OUT_BASE / 4 + IMG_W * IMG_H <= WORDS) else $fatal(1, "memory model too small");
  end

  initial clk = 1'b0;
  always #5 clk = ~clk;

  axi_mem_model #(.NPORTS(N_CU), .WORDS(WORDS)) u_mem (
    .clk, .rst_n,
    .ar(axi_ar), .ar_ready(axi_ar_ready), .r(axi_r), .r_ready(axi_r_ready),
    .aw(axi_aw), .aw_ready(axi_aw_ready), .w(axi_w), .w_ready(axi_w_ready),
    .b(axi_b), .b_ready(axi_b_ready));

  // ---- mechanism counters ----------------------------------------------------
  logic [N_CU-1:0] wrote_since_read;

  always_ff @(posedge clk) begin
    if (!rst_n) wrote_since_read <= '0;
    else begin
      cycles <= cycles + 1;
      if (&busy) n_all_busy <= n_all_busy + 1;
      for (int u = 0; u < N_CU; u++) begin
        if ((axi_ar[u].valid && !axi_ar_ready[u]) || (axi_r_ready[u] && !axi_r[u].valid) ||
            (axi_w[u].valid && !axi_w_ready[u]))
          n_stall <= n_stall + 1;
        if (axi_b[u].valid && axi_b_ready[u]) wrote_since_read[u] <= 1'b1;
        if (axi_ar[u].valid && axi_ar_ready[u]) begin
          wrote_since_read[u] <= 1'b0;
          if (wrote_since_read[u] && busy[u]) n_next_group <= n_next_group + 1;
        end
      end
    end
  end

  // ---- host ------------------------------------------------------------------
  f32_t msk [M][M];
  logic [31:0] expect_mem [WORDS];

  function automatic f32_t pad_px(input int x, input int y);   // padded coords
    return u_mem.mem[(IMG_BASE / 4) + y * PW + x];
  endfunction

  function automatic f32_t ref_pixel(input int x, input int y);
    f32_t s = '0;
    for (int l = 0; l < M; l++)
      for (int k = 0; k < M; k++)
        s = f32_add(s, f32_mul(msk[l][k], pad_px(x + l, y + k)));
    return s;
  endfunction

  initial begin
    #(longint'(TIMEOUT) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t_start, t_done [N_CU];

  initial begin
    rst_n = 1'b0;
    start = '0;
    mask_we = 1'b0; mask_addr = '0; mask_data = '0;
    for (int u = 0; u < N_CU; u++) args[u] = '0;
    // write_data: padded image and random background
    for (int i = 0; i < WORDS; i++) u_mem.mem[i] = $urandom;
    for (int y = 0; y < PH; y++)
      for (int x = 0; x < PW; x++) begin
        bit border;
        border = (x < (M - 1) / 2) || (x >= PW - (M - 1) / 2) ||
                     (y < (M - 1) / 2) || (y >= PH - (M - 1) / 2);
        u_mem.mem[IMG_BASE / 4 + y * PW + x] = border ? 32'h0 : rand_f32(120, 130);
      end
    for (int i = 0; i < WORDS; i++) expect_mem[i] = u_mem.mem[i];
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // activate: mask, then one band of rows per unit
    for (int l = 0; l < M; l++)
      for (int k = 0; k < M; k++) begin
        msk[l][k] = rand_f32(120, 127);
        mask_we = 1'b1; mask_addr = MAW'(l * M + k); mask_data = msk[l][k];
        @(negedge clk);
      end
    mask_we = 1'b0;
    for (int u = 0; u < N_CU; u++) begin
      int row0;
      row0 = u * GROUPS * GH;
      args[u].mem            = 32'd0;
      args[u].a_offset       = IMG_BASE + 32'(row0 * PW * 4);
      args[u].b_offset       = OUT_BASE + 32'(row0 * IMG_W * 4);
      args[u].in_dn          = 16'(GH + M - 1);
      args[u].in_ls          = 32'(PW * 4);
      args[u].in_stride      = 32'(PW * 4);
      args[u].out_dn         = 16'(GH);
      args[u].out_ls         = 32'(IMG_W * 4);
      args[u].out_stride     = 32'(IMG_W * 4);
      args[u].gw             = 16'(IMG_W);
      args[u].gh             = 16'(GH);
      args[u].n_groups       = 16'(GROUPS);
      args[u].in_group_step  = 32'(GH * PW * 4);
      args[u].out_group_step = 32'(GH * IMG_W * 4);
      if (IMG_W % LANES != 0) n_idle_lane_groups += GROUPS;
    end
    start = '1;
    t_start = cycles;
    @(negedge clk);
    start = '0;
    // wait
    begin
      logic [N_CU-1:0] finished;
      finished = '0;
      while (finished != '1) begin
        for (int u = 0; u < N_CU; u++)
          if (done[u] && !finished[u]) begin
            finished[u] = 1'b1;
            t_done[u] = cycles;
          end
        @(negedge clk);
      end
    end
    // read_data: output image and untouched memory
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        f32_t want;
        int   a;
        want = ref_pixel(x, y);
        a    = OUT_BASE / 4 + y * IMG_W + x;
        checks++;
        if (u_mem.mem[a] !== want) begin
          failures++;
          if (failures < 10) $display("out(%0d,%0d) = %h, expected %h", x, y, u_mem.mem[a], want);
        end
        expect_mem[a] = u_mem.mem[a];
      end
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < WORDS; i++)
        if (u_mem.mem[i] !== expect_mem[i]) begin
          bad++;
          if (bad < 4) $display("word %0d (byte %h) = %h, was %h", i, i * 4, u_mem.mem[i], expect_mem[i]);
        end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("%0d memory words outside the output image changed", bad);
      end
    end
    checks++;
    if (u_mem.errors != 0) begin
      failures++;
      $display("%0d AXI protocol errors", u_mem.errors);
    end
    // per-unit run time: at least the engine's own cycles plus one clock per
    // input and output word
    for (int u = 0; u < N_CU; u++) begin
      longint lower;
      lower = longint'(GROUPS) * (GH * ((IMG_W + LANES - 1) / LANES) * M * M + 3 +
                                         (GH + M - 1) * PW + GH * IMG_W);
      checks++;
      if (t_done[u] - t_start < lower) begin
        failures++;
        $display("unit %0d finished in %0d clocks, below the bound %0d", u, t_done[u] - t_start, lower);
      end
      $display("unit %0d: %0d clocks for %0d workgroup(s) (lower bound %0d)", u,
               t_done[u] - t_start, GROUPS, lower);
    end
    // mechanisms
    $display("mechanisms: longest burst %0d, 4KB splits %0d, stalls %0d, all-busy clocks %0d, next-group %0d, idle-lane groups %0d",
             u_mem.max_len, u_mem.boundary_splits, n_stall, n_all_busy, n_next_group, n_idle_lane_groups);
    checks++;
    if (u_mem.max_len != MAX_BURST) begin failures++; $display("burst-length limit never reached"); end
    checks++;
    if (u_mem.boundary_splits == 0) begin failures++; $display("no 4 KB split"); end
    checks++;
    if (n_stall == 0) begin failures++; $display("no stall"); end
    checks++;
    if (n_all_busy == 0) begin failures++; $display("units never all busy"); end
    if (NEED_NEXT_GROUP) begin
      checks++;
      if (n_next_group == 0) begin failures++; $display("no unit ran a second workgroup"); end
    end
    if (NEED_IDLE_LANES) begin
      checks++;
      if (n_idle_lane_groups == 0) begin failures++; $display("no workgroup with idle lanes"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
