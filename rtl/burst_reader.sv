// burst_reader: AXI4 read master that copies a strided 2-D region of DDR
// memory into a compute unit's local memory (the "PS -> PL" memcpy of a
// compute unit).
//
// The region is `rows` rows of `row_bytes` bytes; row r starts at
// base + r * stride in DDR. A region that is contiguous is simply one row.
// Each row is read with INCR bursts of 32-bit beats. A burst is as long as
// possible: at most MAX_BURST beats, never past the end of the row and
// never across a 4 KB address boundary (an AXI4 rule). Word c of row r is
// written to local word r * PITCH + c, one word per accepted beat.
//
// Interface: start (one clock) samples base/rows/row_bytes/stride; busy is
// high until the last beat is written and done pulses for one clock then.
// AR/R are AXI4 channels (the address channel carries valid/addr/len, the
// size is always 4 bytes, the burst type INCR). One burst is in flight at a
// time, so the next AR is issued on the clock after the last R beat.
// Addresses and row_bytes must be multiples of 4; rows = 0 or row_bytes = 0
// finish at once. The read response code is not checked.
//
// From the source: burst transfers of rows separated by a constant stride
// and the 32-bit-per-clock port. This design's own: the burst splitting,
// the single outstanding burst and the local layout.
module burst_reader
  import ocl_pkg::*;
#(
  parameter int unsigned MAX_BURST = AXI_MAX_BURST,
  parameter int unsigned PITCH     = 1928,
  parameter int unsigned LAW       = 14
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [31:0]    base,
  input  logic [15:0]    rows,
  input  logic [31:0]    row_bytes,
  input  logic [31:0]    stride,
  output logic           busy,
  output logic           done,
  // AXI4 read master
  output axi_a_t         ar,
  input  logic           ar_ready,
  input  axi_r_t         r,
  output logic           r_ready,
  // local memory write
  output logic           lm_we,
  output logic [LAW-1:0] lm_waddr,
  output f32_t           lm_wdata
);

  typedef enum logic [1:0] {IDLE, ADDR, DATA} state_t;
  state_t state;

  logic [31:0]    row_addr, cur_addr, row_words, rem_words;
  logic [31:0]    stride_q;
  logic [15:0]    rows_q, row;
  logic [LAW-1:0] lm_row, col;
  logic [8:0]     beats;            // beats of the current burst still to come
  logic [8:0]     blen;             // length of the current burst
  logic [31:0]    to_boundary;
  logic [31:0]    nbeats;

  // longest legal burst from cur_addr
  always_comb begin
    to_boundary = (AXI_BOUNDARY - 32'(cur_addr[11:0])) >> 2;
    nbeats = rem_words;
    if (nbeats > MAX_BURST) nbeats = MAX_BURST;
    if (nbeats > to_boundary) nbeats = to_boundary;
  end

  assign ar.valid = (state == ADDR);
  assign ar.addr  = cur_addr;
  assign ar.len   = 8'(nbeats - 32'd1);
  assign r_ready  = (state == DATA);

  assign lm_we    = r.valid && r_ready;
  assign lm_waddr = lm_row + col;
  assign lm_wdata = r.data;

  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      done  <= 1'b0;
      row_addr <= '0; cur_addr <= '0; row_words <= '0; rem_words <= '0;
      stride_q <= '0; rows_q <= '0; row <= '0; lm_row <= '0; col <= '0;
      beats <= '0; blen <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          if (rows == 0 || row_bytes < 4) done <= 1'b1;
          else begin
            state     <= ADDR;
            row_addr  <= base;
            cur_addr  <= base;
            row_words <= row_bytes >> 2;
            rem_words <= row_bytes >> 2;
            stride_q  <= stride;
            rows_q    <= rows;
            row       <= '0;
            lm_row    <= '0;
            col       <= '0;
          end
        end
        ADDR: if (ar_ready) begin
          beats <= 9'(nbeats);
          blen  <= 9'(nbeats);
          state <= DATA;
        end
        DATA: if (r.valid) begin
          col   <= col + LAW'(1);
          beats <= beats - 9'd1;
          if (beats == 9'd1) begin
            // burst complete
            if (rem_words == 32'(blen)) begin
              // row complete
              if (row == rows_q - 16'd1) begin
                state <= IDLE;
                done  <= 1'b1;
              end else begin
                row       <= row + 16'd1;
                row_addr  <= row_addr + stride_q;
                cur_addr  <= row_addr + stride_q;
                rem_words <= row_words;
                lm_row    <= lm_row + LAW'(PITCH);
                col       <= '0;
                state     <= ADDR;
              end
            end else begin
              cur_addr  <= cur_addr + (32'(blen) << 2);
              rem_words <= rem_words - 32'(blen);
              state     <= ADDR;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // the slave must close each burst on its last beat
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == DATA && r.valid) |-> (r.last == (beats == 9'd1)))
    else $error("R.last does not match the burst length");

endmodule
