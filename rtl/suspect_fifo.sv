// suspect_fifo: the small buffer between the Bloom filter and the detection
// stage. The detection stage needs several cycles per sub-string while the
// Bloom filter can flag a window every cycle; the buffer absorbs short runs
// of back-to-back suspicious windows.
//
// The published design only says a small buffer is needed. Depth, the
// first-word-fall-through behaviour and the overflow handling are this
// design's: network traffic cannot be stalled, so a write into a full buffer
// is dropped and reported on overflow for one cycle.
//
// Interface and timing:
//   wr_en/wr_data  push at the clock edge (ignored when full).
//   rd_en          pop at the clock edge; rd_data always shows the oldest
//                  entry while empty is low.
//   full/empty     status decoded from the registered pointers; overflow is a registered pulse.
module suspect_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic         overflow
);

  logic [W-1:0] mem [DEPTH];
  logic [PW:0]  wptr, rptr;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  logic [PW:0] count;
  assign count   = wptr - rptr;
  assign empty   = (wptr == rptr);
  assign full    = (count == (PW+1)'(DEPTH));
  assign rd_data = mem[rptr[PW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[PW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      overflow <= wr_en && full;
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(rd_en && empty));

endmodule
