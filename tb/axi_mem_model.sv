// axi_mem_model: behavioural stand-in for the DDR memory behind the
// processing system's AXI slave ports (HP0-HP3, ACP). NPORTS independent
// AXI4 slave ports share one word array `mem` (byte address / 4, modulo
// WORDS) that testbenches fill and inspect directly.
//
// Each port accepts one read and one write burst at a time, with random
// ready and valid gaps (about one clock in STALL_DIV is stalled) so masters
// see back-pressure. It counts protocol errors: a burst that crosses a 4 KB
// boundary, or a W.last that does not match the AW length. It also counts
// read and write bursts and beats per port, and the bursts that ended on a
// 4 KB boundary short of 256 beats, for the testbenches' coverage counts.
module axi_mem_model
  import ocl_pkg::*;
#(
  parameter int unsigned NPORTS    = 1,
  parameter int unsigned WORDS     = 65536,
  parameter int unsigned STALL_DIV = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  axi_a_t ar       [NPORTS],
  output logic   ar_ready [NPORTS],
  output axi_r_t r        [NPORTS],
  input  logic   r_ready  [NPORTS],
  input  axi_a_t aw       [NPORTS],
  output logic   aw_ready [NPORTS],
  input  axi_w_t w        [NPORTS],
  output logic   w_ready  [NPORTS],
  output axi_b_t b        [NPORTS],
  input  logic   b_ready  [NPORTS]
);

  logic [31:0] mem [WORDS];

  int errors = 0;
  int rd_bursts [NPORTS], wr_bursts [NPORTS], rd_beats [NPORTS], wr_beats [NPORTS];
  int boundary_splits = 0, max_len = 0;

  function automatic int idx(input logic [31:0] a);
    return int'((a >> 2) % WORDS);
  endfunction

  function automatic bit go();
    return ($urandom_range(0, STALL_DIV - 1) != 0);
  endfunction

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    logic        r_busy, ar_rdy, aw_rdy, w_rdy, w_busy, b_pend;
    logic [31:0] raddr, waddr;
    int          rleft, wleft;

    assign ar_ready[p] = !r_busy && ar_rdy;
    assign aw_ready[p] = !w_busy && aw_rdy;
    assign w_ready[p]  = w_busy && !b_pend && wleft > 0 && w_rdy;
    assign b[p].valid  = b_pend;
    assign b[p].resp   = 2'b00;
    assign r[p].resp   = 2'b00;

    function automatic void check_burst(input logic [31:0] a, input logic [7:0] len);
      if (int'(a[11:0]) + (int'(len) + 1) * 4 > 4096) begin
        errors++;
        $display("axi_mem_model port %0d: burst at %h len %0d crosses 4 KB", p, a, len);
      end
      if (int'(len) + 1 > max_len) max_len = int'(len) + 1;
      if (((a + (32'(len) + 1) * 4) & 32'hFFF) == 0 && len != 8'd255) boundary_splits++;
    endfunction

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        r_busy <= 1'b0; ar_rdy <= 1'b0; r[p].valid <= 1'b0; r[p].last <= 1'b0; r[p].data <= '0;
        raddr <= '0; rleft <= 0;
        aw_rdy <= 1'b0; w_rdy <= 1'b0; w_busy <= 1'b0; b_pend <= 1'b0; waddr <= '0; wleft <= 0;
      end else begin
        ar_rdy <= go();
        aw_rdy <= go();
        w_rdy  <= go();
        // read side
        if (ar[p].valid && ar_ready[p]) begin
          check_burst(ar[p].addr, ar[p].len);
          r_busy <= 1'b1;
          raddr  <= ar[p].addr;
          rleft  <= int'(ar[p].len) + 1;
          rd_bursts[p] <= rd_bursts[p] + 1;
        end
        if (r_busy && rleft > 0 && (!r[p].valid || r_ready[p]) && go()) begin
          r[p].valid <= 1'b1;
          r[p].data  <= mem[idx(raddr)];
          r[p].last  <= (rleft == 1);
          raddr <= raddr + 32'd4;
          rleft <= rleft - 1;
        end else if (r[p].valid && r_ready[p]) begin
          r[p].valid <= 1'b0;
        end
        if (r[p].valid && r_ready[p]) begin
          rd_beats[p] <= rd_beats[p] + 1;
          if (r[p].last) r_busy <= 1'b0;
        end
        // write side
        if (aw[p].valid && aw_ready[p]) begin
          check_burst(aw[p].addr, aw[p].len);
          w_busy <= 1'b1;
          waddr  <= aw[p].addr;
          wleft  <= int'(aw[p].len) + 1;
          wr_bursts[p] <= wr_bursts[p] + 1;
        end
        if (w[p].valid && w_ready[p]) begin
          for (int k = 0; k < 4; k++)
            if (w[p].strb[k]) mem[idx(waddr)][8*k +: 8] <= w[p].data[8*k +: 8];
          waddr <= waddr + 32'd4;
          wleft <= wleft - 1;
          wr_beats[p] <= wr_beats[p] + 1;
          if (w[p].last != (wleft == 1)) begin
            errors++;
            $display("axi_mem_model port %0d: W.last wrong", p);
          end
          if (wleft == 1) b_pend <= 1'b1;
        end
        if (b_pend && b_ready[p]) begin
          b_pend <= 1'b0;
          w_busy <= 1'b0;
        end
      end
    end

    initial begin
      rd_bursts[p] = 0; wr_bursts[p] = 0; rd_beats[p] = 0; wr_beats[p] = 0;
    end
  end

endmodule
