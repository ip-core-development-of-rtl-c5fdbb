// trace_memory: on-chip trace storage, a FIFO over a single-port-per-side RAM
// with circular buffer management.
//
// Words from the packing stage are written at the write pointer; the
// trace-out side reads the oldest word at the read pointer. Both pointers wrap
// around the DEPTH-word array. When the memory is full:
//   wrap = 1 - the new word overwrites the oldest one and the read pointer
//              moves on (circular buffer: the memory keeps the most recent
//              DEPTH words, the samples before the trigger);
//   wrap = 0 - the new word is discarded. To keep the end of the trace
//              intact, 'almost_full' (at most AFULL_MARGIN free words) tells
//              the event generation module to end the trace early enough for
//              the words still in the tracer pipeline to fit.
// 'overwritten' records that old words were lost to wrapping; the first word
// left may then start in the middle of a packet.
//
// Timing: a write is stored at the clock edge; rd_en at cycle t gives the
// word on rdata at t+1 (registered read, as in an FPGA block RAM). Reading
// and writing in the same cycle is allowed, also when full. clear empties
// the memory (pointers only).
//
// The document stores the packets in a trace memory built as a FIFO and has
// circular buffer management; the depth and width (128 words of 128 bits,
// 16 kbit, the data capacity of one 18-kbit FPGA block RAM) are this
// design's choice.
module trace_memory #(
  parameter int W            = 128,
  parameter int DEPTH        = 128,
  parameter int AFULL_MARGIN = 8     // free words left when almost_full rises
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       wrap,
  input  logic                       wr_en,
  input  logic [W-1:0]               wdata,
  input  logic                       rd_en,
  output logic [W-1:0]               rdata,
  output logic                       empty,
  output logic                       full,
  output logic                       almost_full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overwritten
);

  localparam int AW_M = $clog2(DEPTH);

  logic [W-1:0]    mem [DEPTH];
  logic [AW_M-1:0] wptr, rptr;

  assign empty = (count == '0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign almost_full = (count >= ($clog2(DEPTH+1))'(DEPTH - AFULL_MARGIN));

  wire do_rd = rd_en && !empty;
  wire do_wr = wr_en && (!full || wrap || do_rd);
  // a write into a full memory without a read drops the oldest word
  wire drop_oldest = do_wr && full && !do_rd;

  function automatic logic [AW_M-1:0] inc(logic [AW_M-1:0] p);
    return (p == AW_M'(DEPTH - 1)) ? '0 : p + AW_M'(1);
  endfunction

  // storage (no reset, so it maps onto a RAM block)
  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
    if (do_rd) rdata <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr        <= '0;
      rptr        <= '0;
      count       <= '0;
      overwritten <= 1'b0;
    end else if (clear) begin
      wptr        <= '0;
      rptr        <= '0;
      count       <= '0;
      overwritten <= 1'b0;
    end else begin
      if (do_wr) wptr <= inc(wptr);
      if (do_rd || drop_oldest) rptr <= inc(rptr);
      if (drop_oldest) overwritten <= 1'b1;
      if (do_wr && !do_rd && !full) count <= count + 1'b1;
      else if (do_rd && !do_wr)     count <= count - 1'b1;
    end
  end

endmodule
