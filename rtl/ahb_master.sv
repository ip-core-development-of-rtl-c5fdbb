// ahb_master: a simple AMBA AHB 2.0 bus master, the traffic source whose port
// the tracer observes.
//
// A command (start address, number of beats, read or write, first write
// datum, lock) is accepted on cmd_valid & cmd_ready. The master raises HBUSREQ,
// waits until it owns the address bus (HGRANT sampled high with HREADY), and
// issues word-sized transfers at consecutive word addresses: NONSEQ for the
// first beat (or the first beat after losing the bus), SEQ after that. A
// single beat uses HBURST=SINGLE, more beats HBURST=INCR. Write beat i carries
// cmd_wdata + i. Read data is returned on rd_valid/rd_data, one pulse per
// completed read beat. The command ends with a done pulse once the last data
// phase has completed.
//
// Address and data phases overlap as AHB requires: everything advances only
// on a rising HCLK edge with HREADY high. On the first cycle of a two-cycle
// ERROR, RETRY or SPLIT response the master drives IDLE and abandons the rest
// of the command (done with error set); it does not retry.
//
// The port names follow the AHB master symbol of the document. Burst choice,
// command interface, HPROT value and the abort-on-error policy are this
// design's own.
module ahb_master
  import tracer_pkg::*;
#(
  parameter int BEATS_W = 8     // width of the beat count of a command
) (
  input  logic               HCLK,
  input  logic               HRESETn,
  // AHB master port
  input  logic               HGRANT,
  input  logic               HREADY,
  input  logic [1:0]         HRESP,
  input  logic [DW-1:0]      HRDATA,
  output logic               HBUSREQ,
  output logic               HLOCK,
  output logic [1:0]         HTRANS,
  output logic [AW-1:0]      HADDR,
  output logic               HWRITE,
  output logic [2:0]         HSIZE,
  output logic [2:0]         HBURST,
  output logic [3:0]         HPROT,
  output logic [DW-1:0]      HWDATA,
  // command interface
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  logic               cmd_write,
  input  logic [AW-1:0]      cmd_addr,
  input  logic [BEATS_W-1:0] cmd_beats,   // 0 is treated as 1
  input  logic [DW-1:0]      cmd_wdata,
  input  logic               cmd_lock,
  output logic               rd_valid,
  output logic [DW-1:0]      rd_data,
  output logic               done,
  output logic               error
);

  logic               busy;
  logic               owner;      // this master owns the address bus
  logic [BEATS_W-1:0] beats;      // beats of the command
  logic [BEATS_W-1:0] issued;     // address phases accepted so far
  logic               first;      // next address phase must be NONSEQ
  logic [AW-1:0]      base;
  logic [DW-1:0]      wbase;
  logic               wr;
  logic               dp_pend;    // a data phase of this master is in progress
  logic               dp_write;
  logic               aborted;

  wire addr_active = (HTRANS == TR_NONSEQ) || (HTRANS == TR_SEQ);
  wire bad_resp    = !HREADY && (HRESP != RSP_OKAY);

  // beats accepted after this edge, when the current address phase is taken
  logic [BEATS_W-1:0] issued_nx;
  always_comb issued_nx = issued + BEATS_W'(addr_active);

  assign cmd_ready = !busy;
  assign HSIZE     = 3'b010;          // word
  assign HPROT     = 4'b0011;         // data access, privileged
  assign HBUSREQ   = busy && !aborted && (issued_nx < beats);

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      busy     <= 1'b0;
      owner    <= 1'b0;
      beats    <= '0;
      issued   <= '0;
      first    <= 1'b1;
      base     <= '0;
      wbase    <= '0;
      wr       <= 1'b0;
      dp_pend  <= 1'b0;
      dp_write <= 1'b0;
      aborted  <= 1'b0;
      HTRANS   <= TR_IDLE;
      HADDR    <= '0;
      HWRITE   <= 1'b0;
      HBURST   <= BURST_SINGLE;
      HLOCK    <= 1'b0;
      HWDATA   <= '0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
      done     <= 1'b0;
      error    <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      done     <= 1'b0;

      if (cmd_valid && cmd_ready) begin
        busy    <= 1'b1;
        beats   <= (cmd_beats == '0) ? BEATS_W'(1) : cmd_beats;
        issued  <= '0;
        first   <= 1'b1;
        base    <= {cmd_addr[AW-1:2], 2'b00};
        wbase   <= cmd_wdata;
        wr      <= cmd_write;
        HLOCK   <= cmd_lock;
        aborted <= 1'b0;
        error   <= 1'b0;
      end

      if (bad_resp) begin
        // first cycle of a two-cycle error response: cancel what follows
        HTRANS  <= TR_IDLE;
        aborted <= 1'b1;
        error   <= 1'b1;
      end else if (HREADY) begin
        owner <= HGRANT;
        // data phase completes
        if (dp_pend && !dp_write && HRESP == RSP_OKAY) begin
          rd_valid <= 1'b1;
          rd_data  <= HRDATA;
        end
        // address phase moves into the data phase
        dp_pend  <= addr_active;
        dp_write <= HWRITE;
        if (addr_active) begin
          issued <= issued_nx;
          first  <= 1'b0;
          if (HWRITE) HWDATA <= wbase + DW'(issued);
        end
        // next address phase
        if (busy && !aborted && HGRANT && issued_nx < beats) begin
          HTRANS <= ((first && !addr_active) || !owner) ? TR_NONSEQ : TR_SEQ;
          HADDR  <= base + AW'({issued_nx, 2'b00});
          HWRITE <= wr;
          HBURST <= (beats == BEATS_W'(1)) ? BURST_SINGLE : BURST_INCR;
        end else begin
          HTRANS <= TR_IDLE;
        end
        // command complete: nothing left to issue, last data phase done
        if (busy && (aborted || issued_nx >= beats) && !addr_active && dp_pend) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          HLOCK <= 1'b0;
        end else if (busy && aborted && !dp_pend && !addr_active) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          HLOCK <= 1'b0;
        end
      end
    end
  end

endmodule
