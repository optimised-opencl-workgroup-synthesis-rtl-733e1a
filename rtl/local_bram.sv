// local_bram: partitioned on-chip local memory of a compute unit.
//
// The kernel's local arrays live in block RAM, split cyclically into BANKS
// banks so that BANKS neighbouring words (the data of neighbouring
// work-items) can be reached in the same clock through different ports.
// Word w of the array is at index w / BANKS of bank w % BANKS; the users of
// this block do that mapping. Each bank is a simple dual-port RAM: one write
// port and one read port, which maps onto one FPGA block-RAM primitive per
// bank (per cascade of primitives).
//
// Interface: per bank a write (we, waddr, wdata) and a read (raddr, rdata).
// Timing: writes take effect at the clock edge; rdata holds the word that
// raddr selected at the previous edge (one-clock read latency). Reading and
// writing the same index in the same clock returns the old word. The
// contents are not reset.
module local_bram #(
  parameter int unsigned BANKS = 2,
  parameter int unsigned DEPTH = 7712,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic [BANKS-1:0] we,
  input  logic [AW-1:0]    waddr [BANKS],
  input  logic [WIDTH-1:0] wdata [BANKS],
  input  logic [AW-1:0]    raddr [BANKS],
  output logic [WIDTH-1:0] rdata [BANKS]
);

  for (genvar g = 0; g < BANKS; g++) begin : g_bank
    logic [WIDTH-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (we[g]) mem[waddr[g]] <= wdata[g];
    end

    always_ff @(posedge clk) begin
      rdata[g] <= mem[raddr[g]];
    end
  end

endmodule
