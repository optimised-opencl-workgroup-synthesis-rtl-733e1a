// tb_conv_engine: runs the convolution loop nest on small workgroups and
// compares every output pixel with a sequential binary32 model of the
// kernel (same l-outer, k-inner order, one rounding per multiply and per
// add). Uses LANES = 4 and a 5x5 mask so that the bank rotation takes all of
// its values, and a group width that is not a multiple of LANES so the
// unused lanes must stay unwritten (they must keep the previous run's values). Checks
// the run time against gh * ceil(gw/LANES) * M * M + 3 clocks.
module tb_conv_engine;
  import ocl_pkg::*;
  import tb_f32_pkg::*;

  localparam int unsigned LANES = 4, M = 5, GW_MAX = 11, GH_MAX = 3;
  localparam int unsigned IN_ROWS = GH_MAX + M - 1;
  localparam int unsigned IN_PITCH = 16, OUT_PITCH = 12;
  localparam int unsigned IN_DEPTH = IN_ROWS * IN_PITCH / LANES;
  localparam int unsigned OUT_DEPTH = GH_MAX * OUT_PITCH / LANES;
  localparam int unsigned IAW = $clog2(IN_DEPTH), OAW = $clog2(OUT_DEPTH);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [15:0] gw, gh;
  logic mask_we = 0;
  logic [$clog2(M*M)-1:0] mask_addr;
  f32_t mask_data;
  logic [IAW-1:0] in_raddr [LANES];
  f32_t in_rdata [LANES];
  logic [LANES-1:0] in_we, out_we;
  logic [IAW-1:0] in_waddr [LANES];
  f32_t in_wdata [LANES];
  logic [OAW-1:0] out_waddr [LANES], out_raddr [LANES];
  f32_t out_wdata [LANES], out_rdata [LANES];

  int checks = 0, failures = 0;
  f32_t img [IN_ROWS][IN_PITCH];
  f32_t msk [M][M];

  always #5 clk = ~clk;

  conv_engine #(.LANES(LANES), .M(M), .GW_MAX(GW_MAX), .GH_MAX(GH_MAX), .IN_ROWS(IN_ROWS),
                .IN_PITCH(IN_PITCH), .OUT_PITCH(OUT_PITCH)) dut (
    .clk, .rst_n, .start, .gw, .gh, .busy, .done, .mask_we, .mask_addr, .mask_data,
    .in_raddr, .in_rdata, .out_we, .out_waddr, .out_wdata);

  local_bram #(.BANKS(LANES), .DEPTH(IN_DEPTH)) u_in (
    .clk, .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .raddr(in_raddr), .rdata(in_rdata));
  local_bram #(.BANKS(LANES), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .we(out_we), .waddr(out_waddr), .wdata(out_wdata), .raddr(out_raddr), .rdata(out_rdata));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_input();
    @(negedge clk);
    in_we = '0;
    for (int r = 0; r < IN_ROWS; r++)
      for (int c = 0; c < IN_PITCH; c++) begin
        img[r][c] = rand_f32(120, 130);
        in_we = '0;
        in_we[c % LANES] = 1'b1;
        in_waddr[c % LANES] = IAW'((r * IN_PITCH + c) / LANES);
        in_wdata[c % LANES] = img[r][c];
        @(negedge clk);
      end
    in_we = '0;
  endtask

  function automatic f32_t ref_pixel(input int li, input int lj);
    f32_t s = '0;
    for (int l = 0; l < M; l++)
      for (int k = 0; k < M; k++)
        s = f32_add(s, f32_mul(msk[l][k], img[lj + k][li + l]));
    return s;
  endfunction

  task automatic run(input int w, input int h);
    int cyc = 0;
    gw = 16'(w); gh = 16'(h);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != h * ((w + LANES - 1) / LANES) * M * M + 3) begin
      failures++;
      $display("cycle count %0d, expected %0d", cyc, h * ((w + LANES - 1) / LANES) * M * M + 3);
    end
  endtask

  f32_t prev [GH_MAX][OUT_PITCH];   // expected contents after the previous run
  int   prev_w = 0;                  // columns of prev that are known

  task automatic check_output(input int w, input int h);
    f32_t got;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < OUT_PITCH; c++) begin
        out_raddr[c % LANES] = OAW'((r * OUT_PITCH + c) / LANES);
        @(posedge clk); #1;
        got = out_rdata[c % LANES];
        if (c < w) begin
          checks++;
          prev[r][c] = ref_pixel(c, r);
          if (got !== prev[r][c]) begin
            failures++;
            if (failures < 10) $display("pixel (%0d,%0d) = %h, expected %h", c, r, got, ref_pixel(c, r));
          end
        end else if (c < ((w + LANES - 1) / LANES) * LANES && c < prev_w) begin
          checks++;   // lanes beyond gw must leave the word alone
          if (got !== prev[r][c]) begin
            failures++;
            $display("lane beyond gw wrote column %0d", c);
          end
        end
      end
  endtask

  initial begin
    in_we = '0;
    for (int q = 0; q < LANES; q++) begin
      in_waddr[q] = '0; in_wdata[q] = '0; out_raddr[q] = '0;
    end
    gw = 0; gh = 0; mask_addr = '0; mask_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int l = 0; l < M; l++)
      for (int k = 0; k < M; k++) begin
        msk[l][k] = rand_f32(120, 127);
        mask_we = 1; mask_addr = 5'(l * M + k); mask_data = msk[l][k];
        @(negedge clk);
      end
    mask_we = 0;
    // run 1: full-size group; gives every output word a known value
    load_input();
    run(11, 3);
    check_output(11, 3);
    prev_w = 11;
    // run 2: narrower group on new data; columns 5..7 are computed by idle
    // lanes and must keep the values of run 1
    load_input();
    run(5, 2);
    check_output(5, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
