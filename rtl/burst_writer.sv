// burst_writer: AXI4 write master that copies a compute unit's local
// output memory to a strided 2-D region of DDR memory (the "PL -> PS"
// memcpy of a compute unit).
//
// The region is `rows` rows of `row_bytes` bytes; row r goes to
// base + r * stride and comes from local words r * PITCH onwards. Bursts
// are split as in burst_reader: at most MAX_BURST beats, never past the end
// of a row, never across a 4 KB boundary. Local memory has a one-clock read
// latency, so the write data pass through a two-entry prefetch buffer that
// keeps W valid on every clock the slave is ready (one beat per clock).
//
// Interface: start samples base/rows/row_bytes/stride; busy stays high until
// the write response of the last burst has arrived, then done pulses once.
// AW/W/B are AXI4 channels; all byte strobes are set. The master waits for
// each burst's B response before issuing the next AW (one burst in flight).
// The response code is not checked.
//
// From the source: burst transfers, rows at a constant stride, a 32-bit
// port. This design's own: burst splitting, prefetch and one burst in flight.
module burst_writer
  import ocl_pkg::*;
#(
  parameter int unsigned MAX_BURST = AXI_MAX_BURST,
  parameter int unsigned PITCH     = 1920,
  parameter int unsigned LAW       = 11
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
  // AXI4 write master
  output axi_a_t         aw,
  input  logic           aw_ready,
  output axi_w_t         w,
  input  logic           w_ready,
  input  axi_b_t         b,
  output logic           b_ready,
  // local memory read (one clock latency)
  output logic [LAW-1:0] lm_raddr,
  input  f32_t           lm_rdata
);

  typedef enum logic [1:0] {IDLE, ADDR, DATA, RESP} state_t;
  state_t state;

  logic [31:0]    row_addr, cur_addr, row_words, rem_words, stride_q;
  logic [15:0]    rows_q, row;
  logic [LAW-1:0] lm_row, col;        // col: next local word to fetch
  logic [8:0]     blen, fetched, sent;
  logic [31:0]    to_boundary, nbeats;

  // prefetch buffer
  f32_t        buf_q [2];
  logic [1:0]  cnt;
  logic        wp, rp, inflight, fetch, pop;

  always_comb begin
    to_boundary = (AXI_BOUNDARY - 32'(cur_addr[11:0])) >> 2;
    nbeats = rem_words;
    if (nbeats > MAX_BURST) nbeats = MAX_BURST;
    if (nbeats > to_boundary) nbeats = to_boundary;
  end

  assign aw.valid = (state == ADDR);
  assign aw.addr  = cur_addr;
  assign aw.len   = 8'(nbeats - 32'd1);

  assign w.valid = (state == DATA) && (cnt != 2'd0);
  assign w.data  = buf_q[rp];
  assign w.strb  = 4'hF;
  assign w.last  = (sent == blen - 9'd1);
  assign pop     = w.valid && w_ready;

  // fetch while the buffer (counting the word on its way) has room
  assign fetch    = (state == DATA) && (fetched != blen) &&
                    ((32'(cnt) + 32'(inflight) - 32'(pop)) < 32'd2);
  assign lm_raddr = lm_row + col;

  assign b_ready = (state == RESP);
  assign busy    = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      done  <= 1'b0;
      row_addr <= '0; cur_addr <= '0; row_words <= '0; rem_words <= '0; stride_q <= '0;
      rows_q <= '0; row <= '0; lm_row <= '0; col <= '0;
      blen <= '0; fetched <= '0; sent <= '0;
      cnt <= '0; wp <= 1'b0; rp <= 1'b0; inflight <= 1'b0;
      buf_q[0] <= '0; buf_q[1] <= '0;
    end else begin
      done <= 1'b0;

      // prefetch buffer bookkeeping
      inflight <= fetch;
      if (fetch) begin
        col     <= col + LAW'(1);
        fetched <= fetched + 9'd1;
      end
      if (inflight) begin
        buf_q[wp] <= lm_rdata;
        wp <= ~wp;
      end
      if (pop) rp <= ~rp;
      cnt <= cnt + 2'(inflight) - 2'(pop);

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
        ADDR: if (aw_ready) begin
          blen    <= 9'(nbeats);
          fetched <= '0;
          sent    <= '0;
          state   <= DATA;
        end
        DATA: if (pop) begin
          sent <= sent + 9'd1;
          if (w.last) state <= RESP;
        end
        RESP: if (b.valid) begin
          if (rem_words == 32'(blen)) begin
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
        default: state <= IDLE;
      endcase
    end
  end

  // AXI4: W must not change while it waits for ready
  assert property (@(posedge clk) disable iff (!rst_n)
                   (w.valid && !w_ready) |=> (w.valid && $stable(w.data) && $stable(w.last)))
    else $error("W changed while stalled");

endmodule
