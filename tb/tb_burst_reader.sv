// tb_burst_reader: copies strided regions out of a random-stalling AXI
// memory model and checks every word that lands in local memory, that no
// local word outside the region is written, that the beat count equals the
// region size, that the memory model saw no illegal burst, and that both
// kinds of burst split (burst length limit, 4 KB boundary) happened.
// MAX_BURST is lowered to 16 so short rows already need several bursts.
module tb_burst_reader;
  import ocl_pkg::*;

  localparam int unsigned PITCH = 40, LAW = 9, MAXB = 16;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [31:0] base, row_bytes, stride;
  logic [15:0] rows;
  axi_a_t ar [1];
  logic   ar_ready [1];
  axi_r_t r [1];
  logic   r_ready [1];
  axi_a_t aw [1];
  logic   aw_ready [1];
  axi_w_t w [1];
  logic   w_ready [1];
  axi_b_t b [1];
  logic   b_ready [1];
  logic lm_we;
  logic [LAW-1:0] lm_waddr;
  f32_t lm_wdata;

  logic [31:0] local_mem [2**LAW];
  logic        written   [2**LAW];
  int checks = 0, failures = 0, beats = 0;

  always #5 clk = ~clk;

  burst_reader #(.MAX_BURST(MAXB), .PITCH(PITCH), .LAW(LAW)) dut (
    .clk, .rst_n, .start, .base, .rows, .row_bytes, .stride, .busy, .done,
    .ar(ar[0]), .ar_ready(ar_ready[0]), .r(r[0]), .r_ready(r_ready[0]),
    .lm_we, .lm_waddr, .lm_wdata);

  axi_mem_model #(.NPORTS(1), .WORDS(16384)) u_mem (
    .clk, .rst_n, .ar, .ar_ready, .r, .r_ready, .aw, .aw_ready, .w, .w_ready, .b, .b_ready);

  assign aw[0] = '0;
  assign w[0] = '0;
  assign b_ready[0] = 1'b0;

  always_ff @(posedge clk) begin
    if (lm_we) begin
      local_mem[lm_waddr] <= lm_wdata;
      written[lm_waddr]   <= 1'b1;
      beats <= beats + 1;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic copy(input logic [31:0] b0, input int nrows, input int words, input logic [31:0] st);
    int beats0;
    for (int i = 0; i < 2**LAW; i++) written[i] = 1'b0;
    beats0 = beats;
    base = b0; rows = 16'(nrows); row_bytes = 32'(words * 4); stride = st;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (beats - beats0 != nrows * words) begin
      failures++;
      $display("beats %0d, expected %0d", beats - beats0, nrows * words);
    end
    for (int rr = 0; rr < nrows; rr++)
      for (int c = 0; c < PITCH; c++) begin
        if (c < words) begin
          checks++;
          if (!written[rr * PITCH + c] ||
              local_mem[rr * PITCH + c] !== u_mem.mem[((b0 + 32'(rr) * st) / 4 + 32'(c)) % 16384]) begin
            failures++;
            if (failures < 10) $display("row %0d word %0d wrong", rr, c);
          end
        end else if (written[rr * PITCH + c]) begin
          checks++;
          failures++;
          $display("row %0d word %0d written outside the region", rr, c);
        end
      end
  endtask

  initial begin
    for (int i = 0; i < 16384; i++) u_mem.mem[i] = $urandom;
    base = '0; rows = '0; row_bytes = '0; stride = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    copy(32'h0000_0F80, 5, 37, 32'd4000);   // rows straddle 4 KB boundaries
    copy(32'h0000_2000, 1, 40, 32'd0);      // contiguous, 16+16+8
    copy(32'h0000_3FF8, 3, 3, 32'd16);      // 2 beats, boundary, 1 beat
    copy(32'h0000_1000, 0, 3, 32'd16);      // nothing to do
    checks++;
    if (u_mem.errors != 0) begin failures++; $display("illegal bursts seen"); end
    checks++;
    if (u_mem.boundary_splits == 0) begin failures++; $display("no 4 KB split exercised"); end
    checks++;
    if (u_mem.max_len != MAXB) begin failures++; $display("longest burst %0d", u_mem.max_len); end
    $display("bursts %0d, 4 KB splits %0d", u_mem.rd_bursts[0], u_mem.boundary_splits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
