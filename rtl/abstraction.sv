// abstraction: Abstraction Module of the AHB bus tracer.
//
// Reduces the observed bus signals in two dimensions, chosen by the trace
// mode from the event generation module:
//   timing dimension - cycle level: one sample every HCLK cycle while tracing;
//                      transaction level: one sample per completed transfer,
//                      emitted in the cycle its data phase ends (HREADY high)
//                      and combining the address phase (address, control)
//                      with the data phase (data, HRESP).
//   signal dimension - which fields the sample keeps: address only; address
//                      and data; address, data and control; control only.
// The data of a sample is HWDATA when the transfer in the data phase is a
// write and HRDATA otherwise. To pair the two phases the module keeps the
// address and control of the last accepted address phase.
//
// Timing: sample_take is combinational (the cycle a sample is taken); the
// record appears on rec one cycle later. The stop pulse of the event
// generation module is delayed the same way and leaves as rec.flush, so it
// follows the last sample of the trace.
//
// The two dimensions come from the document; the four signal levels, the
// data selection and the pairing of phases are this design's own.
module abstraction
  import tracer_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  ahb_obs_t obs,
  input  logic     trace_en,
  input  mode_t    mode,
  input  logic     stop,
  output logic     sample_take,
  output abs_rec_t rec
);

  // address phase of the transfer now in its data phase
  logic          ap_valid;
  logic [AW-1:0] ap_addr;
  ahb_ctrl_t     ap_ctrl;

  wire addr_phase = obs.ctrl.hready &&
                    (obs.ctrl.htrans == TR_NONSEQ || obs.ctrl.htrans == TR_SEQ);
  wire txn_done   = ap_valid && obs.ctrl.hready;

  assign sample_take = trace_en && (mode.txn ? txn_done : 1'b1);

  abs_rec_t nxt;
  always_comb begin
    nxt       = '0;
    nxt.valid = sample_take;
    nxt.flush = stop;
    nxt.mode  = mode;
    if (mode.txn) begin
      nxt.addr        = ap_addr;
      nxt.ctrl        = ap_ctrl;
      nxt.ctrl.hresp  = obs.ctrl.hresp;
      nxt.ctrl.hready = obs.ctrl.hready;
    end else begin
      nxt.addr = obs.haddr;
      nxt.ctrl = obs.ctrl;
    end
    nxt.data     = (ap_valid && ap_ctrl.hwrite) ? obs.hwdata : obs.hrdata;
    nxt.has_addr = (mode.level != LVL_CTRL);
    nxt.has_data = (mode.level == LVL_ADDR_DATA) || (mode.level == LVL_FULL);
    nxt.has_ctrl = (mode.level == LVL_FULL) || (mode.level == LVL_CTRL);
    // fields that are not kept are zeroed
    if (!nxt.has_addr) nxt.addr = '0;
    if (!nxt.has_data) nxt.data = '0;
    if (!nxt.has_ctrl) nxt.ctrl = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ap_valid <= 1'b0;
      ap_addr  <= '0;
      ap_ctrl  <= '0;
      rec      <= '0;
    end else begin
      rec <= nxt;
      if (obs.ctrl.hready) begin
        ap_valid <= addr_phase;
        ap_addr  <= obs.haddr;
        ap_ctrl  <= obs.ctrl;
      end
    end
  end

endmodule
