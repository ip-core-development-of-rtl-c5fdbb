// tracer_pkg: types and constants shared by the AHB bus tracer.
//
// The tracer watches the signals of one AMBA AHB 2.0 master port (the port
// list follows the AHB master symbol: HBUSREQx, HLOCKx, HTRANS, HADDR, HWRITE,
// HSIZE, HBURST, HPROT, HWDATA out; HGRANTx, HREADY, HRESP, HRDATA in).
// Samples flow through four stages, each with its own record type here:
//   abstraction  -> abs_rec_t  (which fields of a cycle or transfer are kept)
//   compression  -> cmp_rec_t  (address replaced by a dictionary index on a hit)
//   packet_gen   -> pkt_t      (header + fields, variable length, LSB first)
//   trace_buffer -> fixed-width trace memory words
// Every record also carries a 'flush' flag that marks the end of a trace, so
// the last bits can be pushed into the trace memory after the pipeline drains.
//
// The packet format (header layout, field order, mode encoding) is this
// design's own; the document only says that every compressed datum gets a
// header and that mode changes are handled by the packing stage.
package tracer_pkg;

  localparam int AW = 32;  // HADDR width
  localparam int DW = 32;  // HWDATA / HRDATA width

  // HTRANS and HRESP encodings of AHB 2.0
  localparam logic [1:0] TR_IDLE   = 2'b00;
  localparam logic [1:0] TR_BUSY   = 2'b01;
  localparam logic [1:0] TR_NONSEQ = 2'b10;
  localparam logic [1:0] TR_SEQ    = 2'b11;
  localparam logic [1:0] RSP_OKAY  = 2'b00;
  localparam logic [1:0] RSP_ERROR = 2'b01;
  localparam logic [1:0] RSP_RETRY = 2'b10;
  localparam logic [1:0] RSP_SPLIT = 2'b11;
  localparam logic [2:0] BURST_SINGLE = 3'b000;
  localparam logic [2:0] BURST_INCR   = 3'b001;

  // Control signals of the master port, traced as one 19-bit field.
  typedef struct packed {
    logic [1:0] htrans;
    logic       hwrite;
    logic [2:0] hsize;
    logic [2:0] hburst;
    logic [3:0] hprot;
    logic [1:0] hresp;
    logic       hready;
    logic       hbusreq;
    logic       hlock;
    logic       hgrant;
  } ahb_ctrl_t;
  localparam int CTRL_W = $bits(ahb_ctrl_t);

  // Everything observed on the master port in one HCLK cycle.
  typedef struct packed {
    logic [AW-1:0] haddr;
    logic [DW-1:0] hwdata;
    logic [DW-1:0] hrdata;
    ahb_ctrl_t     ctrl;
  } ahb_obs_t;

  // Signal dimension of the abstraction.
  typedef enum logic [1:0] {
    LVL_ADDR      = 2'd0,  // address only
    LVL_ADDR_DATA = 2'd1,  // address and data
    LVL_FULL      = 2'd2,  // address, data and all control signals
    LVL_CTRL      = 2'd3   // control signals only (protocol view)
  } level_e;

  // Trace mode: timing dimension (cycle or transaction) and signal level.
  typedef struct packed {
    logic   txn;    // 1: one sample per completed transfer, 0: one per cycle
    level_e level;
  } mode_t;

  typedef struct packed {
    logic          valid;
    logic          flush;     // last record of a trace (may come with valid=0)
    mode_t         mode;
    logic          has_addr;
    logic          has_data;
    logic          has_ctrl;
    logic [AW-1:0] addr;
    logic [DW-1:0] data;
    ahb_ctrl_t     ctrl;
  } abs_rec_t;

  // Address dictionary: 16 entries, 4-bit index.
  localparam int DICT_N  = 16;
  localparam int DICT_IW = 4;

  typedef struct packed {
    logic          valid;
    logic          flush;
    mode_t         mode;
    logic          comp_en;   // compression was enabled for this record
    logic          has_addr;
    logic          addr_hit;  // address replaced by dictionary index
    logic          has_data;
    logic          has_ctrl;
    logic [AW-1:0] addr;      // full address, or index in the low bits on a hit
    logic [DW-1:0] data;
    ahb_ctrl_t     ctrl;
  } cmp_rec_t;

  // Packet headers, 8 bits, sent LSB first.
  //   [1:0] type: 00 pad (end of data in a word), 01 sample, 10 mode
  //   [6]   loss: packets were dropped just before this one
  //   sample: [2] address present [3] address is a dictionary index
  //           [4] data present    [5] control present  [7] transaction level
  //   mode:   [4:2] new mode {txn, level}  [5] compression enabled
  localparam int HDR_W = 8;
  localparam logic [1:0] PT_PAD    = 2'b00;
  localparam logic [1:0] PT_SAMPLE = 2'b01;
  localparam logic [1:0] PT_MODE   = 2'b10;
  localparam int HDR_LOSS_BIT = 6;

  // Longest packet: mode header + sample header + address + data + control.
  localparam int PKT_MAX = 2 * HDR_W + AW + DW + CTRL_W;  // 99
  localparam int LEN_W   = $clog2(PKT_MAX + 1);

  typedef struct packed {
    logic               valid;
    logic               flush;
    logic [LEN_W-1:0]   len;
    logic [PKT_MAX-1:0] bits;   // packet bits, first bit in bit 0
  } pkt_t;

  // Event register actions
  typedef enum logic [1:0] {
    ACT_START = 2'd0,
    ACT_STOP  = 2'd1,
    ACT_MODE  = 2'd2,
    ACT_NONE  = 2'd3
  } ev_action_e;

  // Register map of the event generation module (word addresses)
  localparam logic [7:0] REG_CTRL  = 8'h00;
  localparam logic [7:0] REG_DEPTH = 8'h01;
  localparam logic [7:0] REG_EV0   = 8'h04;  // event k: 4+4k addr, 5+4k mask, 6+4k ctrl

endpackage
