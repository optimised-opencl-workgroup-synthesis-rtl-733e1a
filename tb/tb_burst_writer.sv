// tb_burst_writer: copies a local memory (a one-clock-latency array kept
// in the testbench) to strided regions of a random-stalling AXI memory
// model. Checks every word of each region, that the words around it are
// untouched, the beat count, that the model saw only legal bursts with
// correct W.last, and that both burst splits happened. It also checks that
// with a slave that never stalls a 16-beat burst takes 16 consecutive W
// clocks (one beat per clock). MAX_BURST is lowered to 16.
module tb_burst_writer;
  import ocl_pkg::*;

  localparam int unsigned PITCH = 40, LAW = 9, MAXB = 16, WORDS = 16384;

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
  logic [LAW-1:0] lm_raddr;
  f32_t lm_rdata;

  logic [31:0] local_mem [2**LAW];
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0;
  int w_beats = 0, w_run = 0, w_run_max = 0;

  always #5 clk = ~clk;

  burst_writer #(.MAX_BURST(MAXB), .PITCH(PITCH), .LAW(LAW)) dut (
    .clk, .rst_n, .start, .base, .rows, .row_bytes, .stride, .busy, .done,
    .aw(aw[0]), .aw_ready(aw_ready[0]), .w(w[0]), .w_ready(w_ready[0]),
    .b(b[0]), .b_ready(b_ready[0]), .lm_raddr, .lm_rdata);

  axi_mem_model #(.NPORTS(1), .WORDS(WORDS)) u_mem (
    .clk, .rst_n, .ar, .ar_ready, .r, .r_ready, .aw, .aw_ready, .w, .w_ready, .b, .b_ready);

  assign ar[0] = '0;
  assign r_ready[0] = 1'b0;

  always_ff @(posedge clk) lm_rdata <= local_mem[lm_raddr];

  // longest run of consecutive W beats
  always_ff @(posedge clk) begin
    if (w[0].valid && w_ready[0]) begin
      w_beats <= w_beats + 1;
      w_run   <= w_run + 1;
      if (w_run + 1 > w_run_max) w_run_max <= w_run + 1;
    end else w_run <= 0;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic copy(input logic [31:0] b0, input int nrows, input int words, input logic [31:0] st);
    int beats0, a;
    for (int i = 0; i < 2**LAW; i++) local_mem[i] = $urandom;
    for (int i = 0; i < WORDS; i++) shadow[i] = u_mem.mem[i];
    beats0 = w_beats;
    base = b0; rows = 16'(nrows); row_bytes = 32'(words * 4); stride = st;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (w_beats - beats0 != nrows * words) begin
      failures++;
      $display("beats %0d, expected %0d", w_beats - beats0, nrows * words);
    end
    for (int rr = 0; rr < nrows; rr++)
      for (int c = 0; c < words; c++) begin
        a = int'(((b0 + 32'(rr) * st) / 4 + 32'(c)) % WORDS);
        shadow[a] = local_mem[rr * PITCH + c];
      end
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (u_mem.mem[i] !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("memory word %0d = %h, expected %h", i, u_mem.mem[i], shadow[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < WORDS; i++) u_mem.mem[i] = $urandom;
    base = '0; rows = '0; row_bytes = '0; stride = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    copy(32'h0000_0F80, 5, 37, 32'd4000);
    copy(32'h0000_2000, 1, 40, 32'd0);
    copy(32'h0000_3FF8, 3, 3, 32'd16);
    checks++;
    if (u_mem.errors != 0) begin failures++; $display("illegal bursts seen"); end
    checks++;
    if (u_mem.boundary_splits == 0) begin failures++; $display("no 4 KB split exercised"); end
    checks++;
    if (u_mem.max_len != MAXB) begin failures++; $display("longest burst %0d", u_mem.max_len); end
    // a slave that never stalls: the burst must stream at one beat per clock
    force u_mem.g_port[0].w_rdy = 1'b1;
    force u_mem.g_port[0].aw_rdy = 1'b1;
    w_run_max = 0;
    copy(32'h0000_2000, 1, 16, 32'd0);
    release u_mem.g_port[0].w_rdy;
    release u_mem.g_port[0].aw_rdy;
    checks++;
    if (w_run_max != 16) begin failures++; $display("longest W run %0d, expected 16", w_run_max); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
