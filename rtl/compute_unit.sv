// compute_unit: one OpenCL compute unit for the image-convolution kernel.
//
// A compute unit runs a list of workgroups one after another. For each it
//   1. copies the workgroup's input region from DDR into the input local
//      memory with AXI bursts (burst_reader),
//   2. runs the merged work-items of the group on LANES processing elements
//      (conv_engine), writing the results into the output local memory,
//   3. copies the output local memory back to DDR (burst_writer),
// then moves its input and output addresses on by in_group_step and
// out_group_step. The three phases run in sequence, not overlapped.
//
// Local memories: the input memory holds IN_ROWS rows of IN_PITCH words,
// the output memory GH_MAX rows of OUT_PITCH words; both are split into
// LANES banks by word index modulo LANES (see local_bram). The default
// sizes hold one workgroup of 1 x 1920 outputs of a 7 x 7 convolution:
// 8 rows of 1928 input words (the (gh+7)(gw+7) words budgeted per unit,
// rounded up to whole lane groups) and 1920 output words.
//
// Interface: args is sampled on start (one clock); busy is high until the
// last group has been written back, then done pulses for one clock.
// mask_* writes the M x M coefficients (index l*M + k) at any time the unit
// is idle. The AXI4 master (axi_*) is the unit's own port to the memory
// system. The host must keep every workgroup within the local memories:
// in_dn <= IN_ROWS, in_ls <= 4*IN_PITCH, out_dn <= GH_MAX,
// out_ls <= 4*OUT_PITCH, gw <= GW_MAX, gh <= GH_MAX, with in_dn = gh + M - 1
// and in_ls = 4*(gw + M - 1) for a full convolution window.
//
// From the source: the five-part structure (ports, local memory, copy in,
// computation, copy out), running the assigned workgroups sequentially, the
// default sizes. This design's own: the plain argument ports in place of a
// register interface and the phase sequencer.
module compute_unit
  import ocl_pkg::*;
#(
  parameter int unsigned LANES     = 2,
  parameter int unsigned M         = 7,
  parameter int unsigned GW_MAX    = 1920,
  parameter int unsigned GH_MAX    = 1,
  parameter int unsigned IN_ROWS   = GH_MAX + M,
  parameter int unsigned IN_PITCH  = ((GW_MAX + M + LANES - 1) / LANES) * LANES,
  parameter int unsigned OUT_PITCH = ((GW_MAX + LANES - 1) / LANES) * LANES,
  parameter int unsigned MAX_BURST = AXI_MAX_BURST,
  localparam int unsigned IN_DEPTH  = IN_ROWS * IN_PITCH / LANES,
  localparam int unsigned OUT_DEPTH = GH_MAX * OUT_PITCH / LANES,
  localparam int unsigned IAW  = (IN_DEPTH > 1) ? $clog2(IN_DEPTH) : 1,
  localparam int unsigned OAW  = (OUT_DEPTH > 1) ? $clog2(OUT_DEPTH) : 1,
  localparam int unsigned ILAW = $clog2(IN_ROWS * IN_PITCH),
  localparam int unsigned OLAW = $clog2(GH_MAX * OUT_PITCH + 1),
  localparam int unsigned MAW  = $clog2(M * M),
  localparam int unsigned LBW  = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  cu_args_t       args,
  output logic           busy,
  output logic           done,
  input  logic           mask_we,
  input  logic [MAW-1:0] mask_addr,
  input  f32_t           mask_data,
  // AXI4 master
  output axi_a_t         axi_ar,
  input  logic           axi_ar_ready,
  input  axi_r_t         axi_r,
  output logic           axi_r_ready,
  output axi_a_t         axi_aw,
  input  logic           axi_aw_ready,
  output axi_w_t         axi_w,
  input  logic           axi_w_ready,
  input  axi_b_t         axi_b,
  output logic           axi_b_ready
);

  // ---- sequencer -------------------------------------------------------------
  typedef enum logic [2:0] {S_IDLE, S_LOAD_GO, S_LOAD, S_COMP_GO, S_COMP, S_STORE_GO, S_STORE}
    state_t;
  state_t state;

  cu_args_t    a;
  logic [31:0] a_cur, b_cur;
  logic [15:0] group;
  logic        rd_done, rd_busy, eng_done, eng_busy, wr_done, wr_busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a     <= '0;
      a_cur <= '0;
      b_cur <= '0;
      group <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a     <= args;
          a_cur <= args.a_offset;
          b_cur <= args.b_offset;
          group <= '0;
          if (args.n_groups == 0) done <= 1'b1;
          else state <= S_LOAD_GO;
        end
        S_LOAD_GO:  state <= S_LOAD;
        S_LOAD:     if (rd_done) state <= S_COMP_GO;
        S_COMP_GO:  state <= S_COMP;
        S_COMP:     if (eng_done) state <= S_STORE_GO;
        S_STORE_GO: state <= S_STORE;
        S_STORE: if (wr_done) begin
          if (group == a.n_groups - 16'd1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            group <= group + 16'd1;
            a_cur <= a_cur + a.in_group_step;
            b_cur <= b_cur + a.out_group_step;
            state <= S_LOAD_GO;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ---- input memory (written by the reader, read by the engine) --------------
  logic [LANES-1:0] in_we;
  logic [IAW-1:0]   in_waddr [LANES];
  f32_t             in_wdata [LANES];
  logic [IAW-1:0]   in_raddr [LANES];
  f32_t             in_rdata [LANES];
  logic             rd_lm_we;
  logic [ILAW-1:0]  rd_lm_waddr;
  f32_t             rd_lm_wdata;

  always_comb begin
    for (int q = 0; q < LANES; q++) begin
      in_we[q]    = rd_lm_we && (int'(rd_lm_waddr) % LANES == q);
      in_waddr[q] = IAW'(int'(rd_lm_waddr) / LANES);
      in_wdata[q] = rd_lm_wdata;
    end
  end

  local_bram #(.BANKS(LANES), .DEPTH(IN_DEPTH)) u_in_mem (
    .clk, .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .raddr(in_raddr), .rdata(in_rdata));

  burst_reader #(.MAX_BURST(MAX_BURST), .PITCH(IN_PITCH), .LAW(ILAW)) u_reader (
    .clk, .rst_n,
    .start    (state == S_LOAD_GO),
    .base     (a.mem + a_cur),
    .rows     (a.in_dn),
    .row_bytes(a.in_ls),
    .stride   (a.in_stride),
    .busy     (rd_busy),
    .done     (rd_done),
    .ar       (axi_ar),
    .ar_ready (axi_ar_ready),
    .r        (axi_r),
    .r_ready  (axi_r_ready),
    .lm_we    (rd_lm_we),
    .lm_waddr (rd_lm_waddr),
    .lm_wdata (rd_lm_wdata));

  // ---- computation ------------------------------------------------------------
  logic [LANES-1:0] out_we;
  logic [OAW-1:0]   out_waddr [LANES];
  f32_t             out_wdata [LANES];
  logic [OAW-1:0]   out_raddr [LANES];
  f32_t             out_rdata [LANES];

  conv_engine #(.LANES(LANES), .M(M), .GW_MAX(GW_MAX), .GH_MAX(GH_MAX), .IN_ROWS(IN_ROWS),
                .IN_PITCH(IN_PITCH), .OUT_PITCH(OUT_PITCH)) u_engine (
    .clk, .rst_n,
    .start    (state == S_COMP_GO),
    .gw       (a.gw),
    .gh       (a.gh),
    .busy     (eng_busy),
    .done     (eng_done),
    .mask_we, .mask_addr, .mask_data,
    .in_raddr, .in_rdata,
    .out_we, .out_waddr, .out_wdata);

  local_bram #(.BANKS(LANES), .DEPTH(OUT_DEPTH)) u_out_mem (
    .clk, .we(out_we), .waddr(out_waddr), .wdata(out_wdata), .raddr(out_raddr), .rdata(out_rdata));

  // ---- output copy: linear reads over the banks -------------------------------
  logic [OLAW-1:0] wr_lm_raddr;
  f32_t            wr_lm_rdata;
  logic [LBW-1:0]  out_bank_q;

  always_comb begin
    for (int q = 0; q < LANES; q++) out_raddr[q] = OAW'(int'(wr_lm_raddr) / LANES);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_bank_q <= '0;
    else        out_bank_q <= LBW'(int'(wr_lm_raddr) % LANES);
  end

  assign wr_lm_rdata = out_rdata[out_bank_q];

  burst_writer #(.MAX_BURST(MAX_BURST), .PITCH(OUT_PITCH), .LAW(OLAW)) u_writer (
    .clk, .rst_n,
    .start    (state == S_STORE_GO),
    .base     (a.mem + b_cur),
    .rows     (a.out_dn),
    .row_bytes(a.out_ls),
    .stride   (a.out_stride),
    .busy     (wr_busy),
    .done     (wr_done),
    .aw       (axi_aw),
    .aw_ready (axi_aw_ready),
    .w        (axi_w),
    .w_ready  (axi_w_ready),
    .b        (axi_b),
    .b_ready  (axi_b_ready),
    .lm_raddr (wr_lm_raddr),
    .lm_rdata (wr_lm_rdata));

endmodule
