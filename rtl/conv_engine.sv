// conv_engine: the computation section of the image-convolution compute
// unit -- the loop nest over the merged work-items of one workgroup.
//
// A workgroup is gh rows by gw columns of output pixels. Its input region,
// (gh + M - 1) rows by (gw + M - 1) columns starting M/2 pixels above and
// left of the first output, is already in the input memory, row r at word
// r * IN_PITCH. Output pixel (li, lj) is
//     sum over l = 0..M-1 (outer), k = 0..M-1 (inner) of
//         mask[l][k] * in[row lj + k][column li + l]
// which is the kernel's xIn = i + l - M/2, yIn = j + k - M/2 seen from the
// corner of the region.
//
// The loop over li is split as in the loop transformation of the workgroup
// synthesis: LANES neighbouring work-items run side by side in LANES
// processing elements (the unrolled inner loop) and the mask loop is
// pipelined, one (l, k) step per clock for all lanes. At step l, lane q
// reads column li + q + l; because li is a multiple of LANES and the input
// memory is cyclically partitioned by column into LANES banks, the lanes
// always hit LANES different banks. Bank b serves lane (b - l) mod LANES,
// and a rotation by l mod LANES steers the bank outputs to the lanes. Each
// lane writes its result to output bank q (output memory also partitioned,
// row pitch OUT_PITCH); lanes past gw are not written.
//
// Timing: after a start pulse, steps are issued on consecutive clocks with
// no bubbles; done pulses gh * ceil(gw / LANES) * M * M + 3 clocks after the
// start edge (one clock to begin, one of read latency, one in the PE and one
// for the output write). The mask is a register file of M*M binary32
// values written through mask_we/mask_addr (index l*M + k), held across runs.
//
// From the source: the kernel, its loop order, the float type, LANES = 2
// and M = 7. This design's own: the memory layout, the rotation crossbar,
// the mask write port and the pipeline depth.
module conv_engine
  import ocl_pkg::*;
#(
  parameter int unsigned LANES     = 2,
  parameter int unsigned M         = 7,
  parameter int unsigned GW_MAX    = 1920,
  parameter int unsigned GH_MAX    = 1,
  parameter int unsigned IN_ROWS   = GH_MAX + M,
  parameter int unsigned IN_PITCH  = ((GW_MAX + M + LANES - 1) / LANES) * LANES,
  parameter int unsigned OUT_PITCH = ((GW_MAX + LANES - 1) / LANES) * LANES,
  localparam int unsigned IN_DEPTH  = IN_ROWS * IN_PITCH / LANES,
  localparam int unsigned OUT_DEPTH = GH_MAX * OUT_PITCH / LANES,
  localparam int unsigned IAW = (IN_DEPTH > 1) ? $clog2(IN_DEPTH) : 1,
  localparam int unsigned OAW = (OUT_DEPTH > 1) ? $clog2(OUT_DEPTH) : 1,
  localparam int unsigned MAW = $clog2(M * M)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [15:0]      gw,
  input  logic [15:0]      gh,
  output logic             busy,
  output logic             done,
  // mask coefficients
  input  logic             mask_we,
  input  logic [MAW-1:0]   mask_addr,
  input  f32_t             mask_data,
  // input memory, read side
  output logic [IAW-1:0]   in_raddr [LANES],
  input  f32_t             in_rdata [LANES],
  // output memory, write side
  output logic [LANES-1:0] out_we,
  output logic [OAW-1:0]   out_waddr [LANES],
  output f32_t             out_wdata [LANES]
);

  localparam int unsigned IN_BPR  = IN_PITCH / LANES;   // bank words per row
  localparam int unsigned OUT_BPR = OUT_PITCH / LANES;

  initial begin
    assert (IN_PITCH % LANES == 0 && OUT_PITCH % LANES == 0)
      else $fatal(1, "pitches must be multiples of LANES");
    assert (IN_PITCH >= GW_MAX + M - 1 && IN_ROWS >= GH_MAX + M - 1)
      else $fatal(1, "input memory too small for the workgroup");
  end

  f32_t mask [M*M];

  always_ff @(posedge clk) begin
    if (mask_we) mask[mask_addr] <= mask_data;
  end

  // ---- stage 0: loop counters ---------------------------------------------
  logic        run;
  logic [15:0] gw_q, gh_q;
  logic [15:0] lj, liw;         // output row, output column / LANES
  logic [7:0]  l, k;            // mask column (x) and row (y) steps
  logic        step_last_k, step_last_l, step_last_li, step_last_lj;
  logic [15:0] liw_n;           // ceil(gw / LANES)

  assign liw_n        = 16'((32'(gw_q) + LANES - 1) / LANES);
  assign step_last_k  = (k == 8'(M - 1));
  assign step_last_l  = (l == 8'(M - 1));
  assign step_last_li = (liw == liw_n - 16'd1);
  assign step_last_lj = (lj == gh_q - 16'd1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0;
      gw_q <= '0; gh_q <= '0;
      lj <= '0; liw <= '0; l <= '0; k <= '0;
    end else if (!run) begin
      if (start && gw != 0 && gh != 0) begin
        run  <= 1'b1;
        gw_q <= gw;
        gh_q <= gh;
        lj <= '0; liw <= '0; l <= '0; k <= '0;
      end
    end else begin
      if (!step_last_k) k <= k + 8'd1;
      else begin
        k <= '0;
        if (!step_last_l) l <= l + 8'd1;
        else begin
          l <= '0;
          if (!step_last_li) liw <= liw + 16'd1;
          else begin
            liw <= '0;
            if (!step_last_lj) lj <= lj + 16'd1;
            else run <= 1'b0;
          end
        end
      end
    end
  end

  // bank addresses: bank b serves lane (b - l) mod LANES, column li + q + l
  always_comb begin
    automatic int unsigned lm, q, col, row;
    lm = int'(l) % LANES;
    row = int'(lj) + int'(k);
    for (int b = 0; b < LANES; b++) begin
      q   = (b + LANES - lm) % LANES;
      col = int'(liw) * LANES + q + int'(l);
      in_raddr[b] = IAW'(row * IN_BPR + col / LANES);
    end
  end

  // ---- stage 1: memory data and coefficient arrive -----------------------
  logic        s1_valid, s1_first, s1_last;
  logic [7:0]  s1_rot;
  f32_t        s1_coef;
  logic [15:0] s1_lj, s1_liw;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_rot   <= '0;
      s1_coef  <= '0;
      s1_lj    <= '0;
      s1_liw   <= '0;
    end else begin
      s1_valid <= run;
      s1_first <= run && (l == 0) && (k == 0);
      s1_last  <= run && step_last_l && step_last_k;
      s1_rot   <= 8'(int'(l) % LANES);
      s1_coef  <= mask[int'(l) * M + int'(k)];
      s1_lj    <= lj;
      s1_liw   <= liw;
    end
  end

  // ---- processing elements -------------------------------------------------
  logic [LANES-1:0] pe_valid;
  f32_t             pe_sum [LANES];
  logic [15:0]      s2_lj, s2_liw;
  logic             s2_final;

  for (genvar q = 0; q < LANES; q++) begin : g_pe
    f32_t pixel;
    assign pixel = in_rdata[(q + int'(s1_rot)) % LANES];

    conv_pe u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (s1_valid),
      .in_first (s1_first),
      .in_last  (s1_last),
      .coef     (s1_coef),
      .pixel    (pixel),
      .out_valid(pe_valid[q]),
      .out_sum  (pe_sum[q])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_lj    <= '0;
      s2_liw   <= '0;
      s2_final <= 1'b0;
    end else begin
      if (s1_valid && s1_last) begin
        s2_lj  <= s1_lj;
        s2_liw <= s1_liw;
      end
      s2_final <= s1_valid && s1_last && !run;   // last workgroup step retired
    end
  end

  // ---- stage 2: write results -----------------------------------------------
  always_comb begin
    for (int q = 0; q < LANES; q++) begin
      out_we[q]    = pe_valid[q] && (int'(s2_liw) * LANES + q < int'(gw_q));
      out_waddr[q] = OAW'(int'(s2_lj) * OUT_BPR + int'(s2_liw));
      out_wdata[q] = pe_sum[q];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) done <= 1'b0;
    else        done <= s2_final;
  end

  assign busy = run | s1_valid | (|pe_valid) | s2_final;

endmodule
