// trace_buffer: the bit FIFO of the Packing Module that turns variable-length
// packets into fixed-width trace memory words.
//
// Packets are appended to a BUF_BITS-bit FIFO, first bit lowest, right after
// the bits already held. Whenever the FIFO holds at least W bits, its lowest W
// bits are written to the trace memory as one word (one word per cycle at
// most). When a trace ends (a packet with flush set), the words still full
// are written as usual and, if fewer than W bits remain, one additional cycle
// writes them as a last word padded with zeros; zero bits read as a PAD
// header, which tells the analyzer that the rest of the word is empty.
//
// The memory port takes one W-bit word per cycle. With the default W = 128,
// longer than the longest packet (99 bits), the FIFO can never overflow: it
// holds less than W bits after each write and a packet always fits. With a
// narrower memory a dense trace mode can bring in more bits per cycle than
// leave. If a packet does not fit into the free space it is then dropped,
// drop_cnt counts it, and the loss bit (bit 6 of the header) of the next
// packet that is accepted is set, so the analyzer sees where the trace has a
// gap.
//
// Timing: a packet accepted at cycle t can leave in a word at t+1 at the
// earliest (wr_en/wdata are registered). clear empties the FIFO.
//
// Collecting the variable-size packets in a FIFO, writing a word when the
// FIFO holds at least the memory width, and the extra cycle for the
// remainder at the end of a trace follow the document; the FIFO size and the
// drop-and-mark policy are this design's own.
module trace_buffer
  import tracer_pkg::*;
#(
  parameter int W        = 128,   // trace memory data width
  parameter int BUF_BITS = 256    // FIFO capacity in bits, at least W + PKT_MAX
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  pkt_t         pkt,
  output logic         wr_en,
  output logic [W-1:0] wdata,
  output logic         empty,      // nothing held and no flush pending
  output logic [15:0]  drop_cnt
);

  localparam int CNT_W = $clog2(BUF_BITS + 1);

  logic [BUF_BITS-1:0] fifo, fifo_a, fifo_n;
  logic [CNT_W-1:0]    cnt, cnt_a, cnt_n;
  logic                flush_pend, flush_pend_n;
  logic                loss_pend;
  logic                out_valid, accept;
  logic [W-1:0]        out_word;
  logic [PKT_MAX-1:0]  pbits;

  always_comb begin
    out_valid = 1'b0;
    out_word  = fifo[W-1:0];
    fifo_a    = fifo;
    cnt_a     = cnt;
    if (cnt >= CNT_W'(W)) begin
      out_valid = 1'b1;
      fifo_a    = fifo >> W;
      cnt_a     = cnt - CNT_W'(W);
    end else if (flush_pend && cnt != '0) begin
      out_valid = 1'b1;                 // the extra cycle for the remainder
      fifo_a    = '0;
      cnt_a     = '0;
    end

    accept = pkt.valid && (CNT_W'(pkt.len) <= CNT_W'(BUF_BITS) - cnt_a);
    pbits  = pkt.bits;
    pbits[HDR_LOSS_BIT] = pkt.bits[HDR_LOSS_BIT] | loss_pend;
    fifo_n = fifo_a;
    cnt_n  = cnt_a;
    if (accept) begin
      fifo_n = fifo_a | (BUF_BITS'(pbits) << cnt_a);
      cnt_n  = cnt_a + CNT_W'(pkt.len);
    end
    flush_pend_n = (flush_pend || pkt.flush) && cnt_n != '0;
  end

  assign empty = (cnt == '0) && !flush_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo       <= '0;
      cnt        <= '0;
      flush_pend <= 1'b0;
      loss_pend  <= 1'b0;
      drop_cnt   <= '0;
      wr_en      <= 1'b0;
      wdata      <= '0;
    end else if (clear) begin
      fifo       <= '0;
      cnt        <= '0;
      flush_pend <= 1'b0;
      loss_pend  <= 1'b0;
      drop_cnt   <= '0;
      wr_en      <= 1'b0;
    end else begin
      fifo       <= fifo_n;
      cnt        <= cnt_n;
      flush_pend <= flush_pend_n;
      wr_en      <= out_valid;
      wdata      <= out_word;
      if (pkt.valid && !accept) begin
        loss_pend <= 1'b1;
        if (drop_cnt != '1) drop_cnt <= drop_cnt + 16'd1;
      end else if (accept) begin
        loss_pend <= 1'b0;
      end
    end
  end

endmodule
