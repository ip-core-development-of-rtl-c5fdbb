// tb_abstraction: builds a pipelined AHB cycle stream (transfers with random
// wait states and idle cycles), works out for every cycle the cycle-level
// sample and, when a data phase ends, the transaction-level sample, and
// checks the module's records one cycle later in each of the eight trace
// modes: field presence per signal level, zeroed fields, data chosen from
// HWDATA or HRDATA, no records while tracing is off, and the flush flag.
module tb_abstraction;
  import tracer_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ahb_obs_t obs;
  logic trace_en = 0, stop = 0, sample_take;
  mode_t mode;
  abs_rec_t rec;

  abstraction dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam int N = 400;
  ahb_obs_t  cyc [N];
  bit        tx_done [N];
  logic [31:0] tx_addr [N], tx_data [N], cyc_data [N];
  ahb_ctrl_t tx_ctrl [N];

  function automatic ahb_ctrl_t mkctrl(logic [1:0] tr, logic w, logic rdy);
    ahb_ctrl_t c = '0;
    c.htrans = tr; c.hwrite = w; c.hsize = 3'b010; c.hburst = 3'b001;
    c.hprot = 4'($urandom); c.hready = rdy; c.hbusreq = 1'($urandom); c.hgrant = 1;
    return c;
  endfunction

  // build the cycle stream
  initial begin
    int c;
    bit dp_valid;
    logic [31:0] dp_addr, dp_wdata;
    ahb_ctrl_t dp_ctrl;
    c = 0; dp_valid = 0; dp_addr = 0; dp_wdata = 0; dp_ctrl = '0;
    while (c < N) begin
      bit nxt_active, nw;
      logic [31:0] na, wd;
      ahb_ctrl_t nc;
      int waits;
      nxt_active = ($urandom % 4) != 0;
      na = $urandom & 32'hFFFF_FFFC;
      nw = 1'($urandom);
      nc = mkctrl(nxt_active ? (1'($urandom) ? TR_NONSEQ : TR_SEQ) : TR_IDLE, nw, 1);
      waits = dp_valid ? $urandom % 3 : 0;
      wd = $urandom;
      for (int k = 0; k <= waits && c < N; k++) begin
        ahb_obs_t o;
        o = '0;
        o.haddr  = na;
        o.ctrl   = nc;
        o.ctrl.hready = (k == waits);
        o.hwdata = (dp_valid && dp_ctrl.hwrite) ? dp_wdata : 32'($urandom);
        o.hrdata = $urandom;
        cyc[c]      = o;
        cyc_data[c] = (dp_valid && dp_ctrl.hwrite) ? o.hwdata : o.hrdata;
        tx_done[c]  = dp_valid && (k == waits);
        if (tx_done[c]) begin
          tx_addr[c] = dp_addr;
          tx_ctrl[c] = dp_ctrl;
          tx_ctrl[c].hresp  = o.ctrl.hresp;
          tx_ctrl[c].hready = 1'b1;
          tx_data[c] = cyc_data[c];
        end
        c++;
      end
      dp_valid = nxt_active;
      dp_addr  = na;
      dp_ctrl  = nc;
      dp_wdata = wd;
    end
  end

  int txn_recs = 0, cyc_recs = 0;
  initial begin
    obs = '0;
    mode = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 8; m++) begin
      mode = mode_t'(m);
      for (int c = 0; c < N; c++) begin
        bit en;
        en = (c % 50) < 40;         // tracing switched off now and then
        obs = cyc[c];
        trace_en = en;
        stop = (c == N - 1);
        @(posedge clk);
        #1;
        begin
          level_e l;
          bit ha, hd, hc, expv;
          l    = mode.level;
          ha   = (l != LVL_CTRL);
          hd   = (l == LVL_ADDR_DATA || l == LVL_FULL);
          hc   = (l == LVL_FULL || l == LVL_CTRL);
          expv = en && (mode.txn ? tx_done[c] : 1'b1);
          check(rec.valid == expv, "valid");
          check(rec.flush == (c == N - 1), "flush");
          if (expv) begin
            check(rec.mode == mode, "mode");
            check(rec.has_addr == ha && rec.has_data == hd && rec.has_ctrl == hc, "presence");
            if (mode.txn) begin
              txn_recs++;
              check(rec.addr == (ha ? tx_addr[c] : 0), "txn address");
              check(rec.data == (hd ? tx_data[c] : 0), "txn data");
              check(rec.ctrl == (hc ? tx_ctrl[c] : '0), "txn control");
            end else begin
              cyc_recs++;
              check(rec.addr == (ha ? cyc[c].haddr : 0), "cycle address");
              check(rec.data == (hd ? cyc_data[c] : 0), "cycle data");
              check(rec.ctrl == (hc ? cyc[c].ctrl : '0), "cycle control");
            end
          end
        end
      end
    end
    check(txn_recs > 100 && cyc_recs > 1000, "both timing levels exercised");
    $display("transaction samples %0d, cycle samples %0d", txn_recs, cyc_recs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
