// packet_gen: packet management and mode change control of the Packing Module.
//
// Compressed records vary in length and kind, so each one is given an 8-bit
// header that tells the trace analyzer how to read it. A header with its
// fields is a packet. The fields follow the header in this order, each only
// when present: address (4-bit dictionary index on a hit, otherwise 32 bits),
// data (32 bits), control (19 bits, ahb_ctrl_t). Bits are numbered from the
// first bit sent: the header is in bits [7:0] of pkt.bits.
//
// Mode change control: whenever the trace mode or the compression enable
// differs from the one last announced (and for the first record of every
// trace) an 8-bit mode packet is put in front of the sample packet, so the
// analyzer always knows the abstraction level of what follows. The header
// formats are in tracer_pkg.
//
// Header generation takes one pipeline stage: the packet for a record
// appears on pkt one cycle after rec. Packet lengths: 8+8 bits minimum with a
// mode packet, at most PKT_MAX = 99 bits.
//
// The document asks for a header per compressed datum, generated in one
// pipeline stage, and for mode change control in the packing stage; the
// header layout is this design's own.
module packet_gen
  import tracer_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  cmp_rec_t rec,
  output pkt_t     pkt
);

  mode_t last_mode;
  logic  last_comp;
  logic  need_mode;

  logic                 send_mode;
  logic [HDR_W-1:0]     mode_hdr, smp_hdr;
  logic [PKT_MAX-1:0]   bits;
  logic [LEN_W-1:0]     off;

  always_comb begin
    send_mode = rec.valid && (need_mode || rec.mode != last_mode || rec.comp_en != last_comp);

    mode_hdr      = '0;
    mode_hdr[1:0] = PT_MODE;
    mode_hdr[4:2] = rec.mode;
    mode_hdr[5]   = rec.comp_en;

    smp_hdr      = '0;
    smp_hdr[1:0] = PT_SAMPLE;
    smp_hdr[2]   = rec.has_addr;
    smp_hdr[3]   = rec.addr_hit;
    smp_hdr[4]   = rec.has_data;
    smp_hdr[5]   = rec.has_ctrl;
    smp_hdr[7]   = rec.mode.txn;

    bits = '0;
    off  = '0;
    if (send_mode) begin
      bits = PKT_MAX'(mode_hdr);
      off  = LEN_W'(HDR_W);
    end
    bits = bits | (PKT_MAX'(smp_hdr) << off);
    off  = off + LEN_W'(HDR_W);
    if (rec.has_addr) begin
      if (rec.addr_hit) begin
        bits = bits | (PKT_MAX'(rec.addr[DICT_IW-1:0]) << off);
        off  = off + LEN_W'(DICT_IW);
      end else begin
        bits = bits | (PKT_MAX'(rec.addr) << off);
        off  = off + LEN_W'(AW);
      end
    end
    if (rec.has_data) begin
      bits = bits | (PKT_MAX'(rec.data) << off);
      off  = off + LEN_W'(DW);
    end
    if (rec.has_ctrl) begin
      bits = bits | (PKT_MAX'(rec.ctrl) << off);
      off  = off + LEN_W'(CTRL_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt       <= '0;
      last_mode <= '0;
      last_comp <= 1'b0;
      need_mode <= 1'b1;
    end else begin
      pkt.valid <= rec.valid;
      pkt.flush <= rec.flush;
      pkt.len   <= rec.valid ? off : '0;
      pkt.bits  <= rec.valid ? bits : '0;
      if (rec.valid) begin
        last_mode <= rec.mode;
        last_comp <= rec.comp_en;
        need_mode <= 1'b0;
      end
      if (rec.flush) need_mode <= 1'b1;
    end
  end

endmodule
