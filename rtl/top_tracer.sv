// top_tracer: an AMBA AHB 2.0 bus master with an embedded, multi-mode bus
// tracer on its port.
//
// The tracer records what happens on the master's AHB port into an on-chip
// trace memory, compressing it on the fly, and offers the result on a
// trace-out stream. Its pipeline, from the bus to the memory:
//
//   AHB port --> event_gen (start/stop/mode, depth)
//            --> abstraction (cycle or transaction level; address, data,
//                             control or a mix)            1 cycle
//            --> compression (address dictionary)          2 cycles
//            --> packet_gen (headers, mode packets)        1 cycle
//            --> trace_buffer (packets -> W-bit words)     1 cycle
//            --> trace_memory (FIFO / circular buffer)
//            --> trace_out (valid/ready stream)
//
// The AHB arbiter and slaves are outside: HGRANT, HREADY, HRESP and HRDATA
// come in as ports and the master's outputs go out. The master is driven by
// a command port (see ahb_master), the tracer by a register port (see
// event_gen for the register map).
//
// Parameters: TM_WIDTH x TM_DEPTH is the trace memory (128 x 128 = 16 kbit,
// the data capacity of one 18-kbit FPGA block RAM), BUF_BITS the packing
// FIFO, NUM_EVENTS the event registers. Because a trace memory word (128
// bits) is longer than the longest packet (99 bits) and the memory takes a
// word every cycle, the tracer keeps up with the bus in every mode and never
// drops a packet at these sizes. With a narrower memory (TM_WIDTH < 99)
// dense modes can overrun the packing FIFO; dropped packets are then counted
// and marked in the stream.
// The chain of blocks follows the document; all sizes are this design's own.
module top_tracer
  import tracer_pkg::*;
#(
  parameter int TM_WIDTH   = 128,
  parameter int TM_DEPTH   = 128,
  parameter int BUF_BITS   = 256,
  parameter int NUM_EVENTS = 2,
  parameter int BEATS_W    = 8
) (
  input  logic                          HCLK,
  input  logic                          HRESETn,
  // AHB master port
  input  logic                          HGRANT,
  input  logic                          HREADY,
  input  logic [1:0]                    HRESP,
  input  logic [DW-1:0]                 HRDATA,
  output logic                          HBUSREQ,
  output logic                          HLOCK,
  output logic [1:0]                    HTRANS,
  output logic [AW-1:0]                 HADDR,
  output logic                          HWRITE,
  output logic [2:0]                    HSIZE,
  output logic [2:0]                    HBURST,
  output logic [3:0]                    HPROT,
  output logic [DW-1:0]                 HWDATA,
  // master command port
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  logic                          cmd_write,
  input  logic [AW-1:0]                 cmd_addr,
  input  logic [BEATS_W-1:0]            cmd_beats,
  input  logic [DW-1:0]                 cmd_wdata,
  input  logic                          cmd_lock,
  output logic                          rd_valid,
  output logic [DW-1:0]                 rd_data,
  output logic                          cmd_done,
  output logic                          cmd_error,
  // tracer register port
  input  logic                          cfg_we,
  input  logic [7:0]                    cfg_addr,
  input  logic [31:0]                   cfg_wdata,
  // trace out
  input  logic                          tout_enable,
  output logic                          tout_valid,
  output logic [TM_WIDTH-1:0]           tout_data,
  input  logic                          tout_ready,
  // status
  output logic                          trc_armed,
  output logic                          trc_active,
  output logic                          trc_triggered,
  output logic                          trc_done,      // trace ended and all words stored
  output logic [NUM_EVENTS-1:0]         trc_ev_hit,
  output logic [$clog2(TM_DEPTH+1)-1:0] trc_count,
  output logic                          trc_overwritten,
  output logic [15:0]                   trc_drop_cnt
);

  // ---- AHB master --------------------------------------------------------
  ahb_master #(.BEATS_W(BEATS_W)) u_master (
    .HCLK, .HRESETn, .HGRANT, .HREADY, .HRESP, .HRDATA,
    .HBUSREQ, .HLOCK, .HTRANS, .HADDR, .HWRITE, .HSIZE, .HBURST, .HPROT, .HWDATA,
    .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_beats, .cmd_wdata, .cmd_lock,
    .rd_valid, .rd_data, .done(cmd_done), .error(cmd_error)
  );

  // ---- what the tracer sees on the port ------------------------------------
  ahb_obs_t obs;
  always_comb begin
    obs.haddr        = HADDR;
    obs.hwdata       = HWDATA;
    obs.hrdata       = HRDATA;
    obs.ctrl.htrans  = HTRANS;
    obs.ctrl.hwrite  = HWRITE;
    obs.ctrl.hsize   = HSIZE;
    obs.ctrl.hburst  = HBURST;
    obs.ctrl.hprot   = HPROT;
    obs.ctrl.hresp   = HRESP;
    obs.ctrl.hready  = HREADY;
    obs.ctrl.hbusreq = HBUSREQ;
    obs.ctrl.hlock   = HLOCK;
    obs.ctrl.hgrant  = HGRANT;
  end

  // ---- tracer ------------------------------------------------------------
  logic     trace_en, comp_en, wrap, clear, stop, sample_take;
  mode_t    mode;
  abs_rec_t abs_rec;
  cmp_rec_t cmp_rec;
  pkt_t     pkt;
  logic                buf_empty;
  logic                tm_wr, tm_rd, tm_empty, tm_afull;
  logic [TM_WIDTH-1:0] tm_wdata, tm_rdata;

  event_gen #(.NUM_EVENTS(NUM_EVENTS)) u_event (
    .clk(HCLK), .rst_n(HRESETn),
    .cfg_we, .cfg_addr, .cfg_wdata,
    .obs, .sample_take, .mem_full(tm_afull),
    .trace_en, .mode, .comp_en, .wrap, .clear, .stop,
    .armed(trc_armed), .triggered(trc_triggered),
    .ev_hit(trc_ev_hit)
  );

  abstraction u_abs (
    .clk(HCLK), .rst_n(HRESETn), .obs, .trace_en, .mode, .stop,
    .sample_take, .rec(abs_rec)
  );

  compression u_comp (
    .clk(HCLK), .rst_n(HRESETn), .comp_en, .rec_in(abs_rec), .rec_out(cmp_rec)
  );

  packet_gen u_pkt (
    .clk(HCLK), .rst_n(HRESETn), .rec(cmp_rec), .pkt
  );

  trace_buffer #(.W(TM_WIDTH), .BUF_BITS(BUF_BITS)) u_buf (
    .clk(HCLK), .rst_n(HRESETn), .clear, .pkt,
    .wr_en(tm_wr), .wdata(tm_wdata), .empty(buf_empty), .drop_cnt(trc_drop_cnt)
  );

  trace_memory #(.W(TM_WIDTH), .DEPTH(TM_DEPTH)) u_mem (
    .clk(HCLK), .rst_n(HRESETn), .clear, .wrap,
    .wr_en(tm_wr), .wdata(tm_wdata), .rd_en(tm_rd), .rdata(tm_rdata),
    .empty(tm_empty), .full(), .almost_full(tm_afull), .count(trc_count), .overwritten(trc_overwritten)
  );

  trace_out #(.W(TM_WIDTH)) u_out (
    .clk(HCLK), .rst_n(HRESETn), .enable(tout_enable),
    .mem_empty(tm_empty), .mem_rd_en(tm_rd), .mem_rdata(tm_rdata),
    .out_valid(tout_valid), .out_data(tout_data), .out_ready(tout_ready)
  );

  // The trace is complete once the event generator has stopped and the
  // pipeline (4 stages) and the packing FIFO have drained into the memory.
  logic [4:0] drain;
  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn)     drain <= '0;
    else if (clear)   drain <= '0;
    else              drain <= {drain[3:0], stop};
  end
  logic stopped;
  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn)                stopped <= 1'b0;
    else if (clear)              stopped <= 1'b0;
    else if (drain[4])           stopped <= 1'b1;
  end

  assign trc_active = trace_en;
  assign trc_done   = stopped && buf_empty && !tm_wr;

endmodule
