// trace_out: off-loads the trace memory to the outside world (for example a
// debug port feeding trace analyzer software).
//
// While 'enable' is high and the trace memory is not empty, the module reads
// the oldest word (rd_en, one cycle of read latency) and offers it on
// out_data with out_valid until the receiver takes it with out_ready.
// Words leave in the order they were written.
//
// Timing: a word is offered two cycles after it is read from a non-empty
// memory; with out_ready held high one word leaves every three cycles. This
// is plenty for off-loading after a trace and keeps the block small.
//
// The document only names the trace-out stage; the valid/ready interface and
// its timing are this design's own.
module trace_out #(
  parameter int W = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  // trace memory read side
  input  logic         mem_empty,
  output logic         mem_rd_en,
  input  logic [W-1:0] mem_rdata,
  // stream to the outside
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready
);

  typedef enum logic [1:0] {O_IDLE, O_WAIT, O_HOLD} state_e;
  state_e state;

  assign mem_rd_en = (state == O_IDLE) && enable && !mem_empty;
  assign out_valid = (state == O_HOLD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= O_IDLE;
      out_data <= '0;
    end else begin
      unique case (state)
        O_IDLE: if (mem_rd_en) state <= O_WAIT;
        O_WAIT: begin
          out_data <= mem_rdata;
          state    <= O_HOLD;
        end
        O_HOLD: if (out_ready) state <= O_IDLE;
        default: state <= O_IDLE;
      endcase
    end
  end

  // a word on offer stays unchanged until it is taken
  property p_hold_stable;
    @(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_data));
  endproperty
  assert property (p_hold_stable);

endmodule
