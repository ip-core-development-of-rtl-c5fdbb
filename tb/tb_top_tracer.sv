// tb_top_tracer: end-to-end test of the master with its bus tracer, at the
// default parameters (128 x 128-bit trace memory). A behavioural slave and
// arbiter add wait states, grant withdrawal and one ERROR response. A bus
// monitor records every completed transfer and every cycle; a reference
// encoder turns the recorded transfers into the packet stream the tracer
// should store, and the words unloaded through trace-out are compared with it
// bit for bit. Six traces:
//   1. START/STOP events, transaction level, all fields, compression on,
//      post-trigger depth 4: exact stream.
//   2. start on arm, a MODE event switching from transaction-level
//      address+data to cycle-level address only: decoded and matched against
//      the monitor.
//   3. cycle level, all fields, no compression, no wrap: the densest mode
//      (99-bit packets every cycle) must lose nothing, and the full memory
//      ends the trace; decoded samples must be consecutive bus cycles.
//   4. wrap (circular buffer), trigger at the end: the memory must hold the
//      last 128 words of the exact stream.
//   5, 6. one fixed program (a loop over hot addresses and a cold one) traced
//      without, then with, compression: both exact, and the compressed trace
//      is shorter by 28 bits per dictionary hit.
// Every mechanism is counted, and one that never happened is a failure.
module tb_top_tracer;
  import tracer_pkg::*;
  import trace_decode_pkg::*;

  logic HCLK = 0, HRESETn = 0;
  always #5 HCLK = ~HCLK;

  logic HGRANT, HREADY, HBUSREQ, HLOCK, HWRITE;
  logic [1:0] HRESP, HTRANS;
  logic [31:0] HRDATA, HADDR, HWDATA;
  logic [2:0] HSIZE, HBURST;
  logic [3:0] HPROT;
  logic cmd_valid = 0, cmd_ready, cmd_write = 0, cmd_lock = 0;
  logic [31:0] cmd_addr = 0, cmd_wdata = 0;
  logic [7:0] cmd_beats = 0;
  logic rd_valid, cmd_done, cmd_error;
  logic [31:0] rd_data;
  logic cfg_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  logic tout_enable = 0, tout_valid, tout_ready = 0;
  logic [127:0] tout_data;
  logic trc_armed, trc_active, trc_triggered, trc_done, trc_overwritten;
  logic [1:0] trc_ev_hit;
  logic [7:0] trc_count;
  logic [15:0] trc_drop_cnt;
  int wait_cycles, slave_errors;

  top_tracer dut (.*);
  ahb_slave_model #(.ERR_ADDR(32'h0000_0F00), .WAIT_PCT(25), .DENY_PCT(10)) slv (
    .HCLK, .HRESETn, .HBUSREQ, .HTRANS, .HADDR, .HWRITE, .HWDATA,
    .HGRANT, .HREADY, .HRESP, .HRDATA, .wait_cycles, .errors(slave_errors));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- mechanism counters ----
  int n_start_ev, n_stop_ev, n_mode_ev, n_dict_hit, n_dict_miss, n_mode_pkt;
  int n_txn_smp, n_cyc_smp, n_loss, n_full_stop, n_wrap, n_pad_word, n_err_traced;
  int n_tout_stall, n_comp_saved;

  // ---- bus monitor ----
  typedef struct {
    logic [31:0] addr;
    logic [31:0] data;
    ahb_ctrl_t   ctrl;
  } txn_t;
  txn_t txq [$];          // completed transfers
  txn_t cyq [$];          // every cycle (address, bus data, control)
  bit          m_dp;
  logic [31:0] m_addr;
  ahb_ctrl_t   m_ctrl, cur;
  always_comb begin
    cur = '0;
    cur.htrans = HTRANS; cur.hwrite = HWRITE; cur.hsize = HSIZE; cur.hburst = HBURST;
    cur.hprot = HPROT; cur.hresp = HRESP; cur.hready = HREADY; cur.hbusreq = HBUSREQ;
    cur.hlock = HLOCK; cur.hgrant = HGRANT;
  end
  always @(posedge HCLK) if (HRESETn) begin
    txn_t c;
    c.addr = HADDR;
    c.ctrl = cur;
    c.data = (m_dp && m_ctrl.hwrite) ? HWDATA : HRDATA;
    cyq.push_back(c);
    if (HREADY) begin
      if (m_dp) begin
        txn_t t;
        t.addr = m_addr;
        t.ctrl = m_ctrl;
        t.ctrl.hresp = HRESP;
        t.ctrl.hready = 1'b1;
        t.data = m_ctrl.hwrite ? HWDATA : HRDATA;
        txq.push_back(t);
      end
      m_dp   <= HTRANS[1];
      m_addr <= HADDR;
      m_ctrl <= cur;
    end
  end

  // ---- reference encoder (from the packet format) ----
  function automatic void put(ref bit s[$], input logic [31:0] v, input int n);
    for (int i = 0; i < n; i++) s.push_back(v[i]);
  endfunction
  function automatic void enc_mode(ref bit s[$], input logic [2:0] m, input bit comp);
    put(s, {24'h0, 2'b00, comp, m, 2'b10}, 8);
  endfunction
  function automatic void enc_sample(ref bit s[$], input logic [2:0] m, input bit comp,
                                     input txn_t t);
    bit ha, hd, hc, hit;
    ha  = m[1:0] != 2'd3;
    hd  = m[1:0] == 2'd1 || m[1:0] == 2'd2;
    hc  = m[1:0] == 2'd2 || m[1:0] == 2'd3;
    hit = comp && ha && t.addr < 32'h40 && t.addr[1:0] == 0;
    put(s, {24'h0, m[2], 1'b0, hc, hd, hit, ha, 2'b01}, 8);
    if (ha) put(s, hit ? t.addr >> 2 : t.addr, hit ? 4 : 32);
    if (hd) put(s, t.data, 32);
    if (hc) put(s, 32'(t.ctrl), 19);
  endfunction

  // ---- drivers ----
  task automatic wr_reg(logic [7:0] a, logic [31:0] d);
    @(posedge HCLK);
    cfg_we <= 1; cfg_addr <= a; cfg_wdata <= d;
    @(posedge HCLK);
    cfg_we <= 0;
  endtask
  function automatic logic [31:0] evctrl(bit w, bit r, logic [1:0] act, logic [2:0] m);
    return {24'h0, m, act, r, w, 1'b1};
  endfunction
  function automatic logic [31:0] ctrlw(bit arm, bit soa, bit wr, logic [2:0] m, bit c);
    return {25'h0, c, m, wr, soa, arm};
  endfunction

  task automatic cmd(bit wr, logic [31:0] a, int beats);
    @(posedge HCLK);
    while (!cmd_ready) @(posedge HCLK);
    cmd_valid <= 1; cmd_write <= wr; cmd_addr <= a; cmd_beats <= 8'(beats);
    cmd_wdata <= $urandom;
    @(posedge HCLK);
    cmd_valid <= 0;
    do @(posedge HCLK); while (!cmd_done);
  endtask

  // random traffic away from the event addresses (0x200..0x3FF)
  task automatic traffic(int n);
    for (int i = 0; i < n; i++) begin
      if (1'($urandom)) cmd(1'($urandom), 32'(4 * ($urandom % 12)), 1 + $urandom % 4);
      else              cmd(1'($urandom), 32'h400 + 32'(4 * ($urandom % 200)), 1 + $urandom % 6);
    end
  endtask

  task automatic wait_idle(int n);
    repeat (n) @(posedge HCLK);
  endtask

  // unload the whole trace memory through trace-out, with a random ready
  task automatic unload(ref bit [127:0] w[$]);
    int quiet = 0;
    w.delete();
    tout_enable <= 1;
    while (quiet < 20) begin
      tout_ready <= ($urandom % 4) != 0;
      @(posedge HCLK);
      if (tout_valid && !tout_ready) n_tout_stall++;
      if (tout_valid && tout_ready) begin w.push_back(tout_data); quiet = 0; end
      else if (trc_count == 0 && !tout_valid) quiet++;
    end
    tout_enable <= 0;
    tout_ready <= 0;
  endtask

  task automatic compare_words(const ref bit [127:0] w[$], const ref bit exp[$],
                               input int first_bit, input string what);
    int bad = 0;
    for (int i = 0; i < w.size() * 128; i++) begin
      int e;
      bit ev;
      e  = first_bit + i;
      ev = (e < exp.size()) ? exp[e] : 1'b0;
      if (w[i / 128][i % 128] != ev) bad++;
    end
    check(bad == 0, what);
    if (bad != 0) $display("  %0d bits differ (%0d words, %0d expected bits)", bad, w.size(), exp.size());
  endtask

  function automatic int find_txn(logic [31:0] a, bit wr, int from);
    for (int i = from; i < txq.size(); i++)
      if (txq[i].addr == a && txq[i].ctrl.hwrite == wr) return i;
    return -1;
  endfunction

  function automatic void count_samples(const ref dec_t d[$]);
    foreach (d[i]) begin
      if (d[i].is_mode) n_mode_pkt++;
      else begin
        if (d[i].txn) n_txn_smp++; else n_cyc_smp++;
        if (d[i].has_addr && d[i].hit) n_dict_hit++;
        if (d[i].has_addr && !d[i].hit) n_dict_miss++;
        if (d[i].has_ctrl && d[i].ctrl[5:4] == RSP_ERROR) n_err_traced++;
      end
      if (d[i].loss) n_loss++;
    end
  endfunction

  bit [127:0] words [$];
  initial begin
    m_dp = 0;
    repeat (3) @(posedge HCLK);
    HRESETn = 1;
    wait_idle(5);

    // ================= trace 1: START / STOP, transaction level, compressed
    begin
      bit exp[$];
      dec_t d[$];
      bit bad;
      int i0, i1, tx0;
      wr_reg(8'h04, 32'h200); wr_reg(8'h05, 32'hFFFF_FFFF); wr_reg(8'h06, evctrl(1, 0, 2'd0, 3'b110));
      wr_reg(8'h08, 32'h300); wr_reg(8'h09, 32'hFFFF_FFFF); wr_reg(8'h0A, evctrl(0, 1, 2'd1, 3'b000));
      wr_reg(8'h01, 32'd4);
      wr_reg(8'h00, ctrlw(1, 0, 0, 3'b110, 1));
      tx0 = txq.size();
      traffic(5);
      check(!trc_active, "not tracing before START");
      cmd(1, 32'h200, 2);
      n_start_ev += trc_active;
      traffic(10);
      cmd(0, 32'hEF8, 4);             // runs into the ERROR address
      traffic(10);
      cmd(0, 32'h300, 1);
      n_stop_ev += trc_triggered;
      traffic(4);
      wait_idle(20);
      check(trc_done && !trc_active, "trace 1 done");
      unload(words);
      // expected: from the START transfer to 3 transfers after the STOP transfer
      i0 = find_txn(32'h200, 1, tx0);
      i1 = find_txn(32'h300, 0, i0);
      check(i0 >= 0 && i1 > i0 && i1 + 3 < txq.size(), "monitor saw the event transfers");
      enc_mode(exp, 3'b110, 1);
      for (int i = i0; i <= i1 + 3; i++) enc_sample(exp, 3'b110, 1, txq[i]);
      if (exp.size() % 128 != 0) n_pad_word++;
      check(words.size() == (exp.size() + 127) / 128, "trace 1 word count");
      compare_words(words, exp, 0, "trace 1 exact stream");
      exp.delete();                   // reuse: decode what was stored
      words_to_bits(words, 128, exp);
      decode(exp, 128, d, bad);
      check(!bad, "trace 1 decodes");
      count_samples(d);
    end

    // ================= trace 2: MODE event, transaction -> cycle level
    begin
      bit s[$];
      dec_t d[$];
      bit bad;
      int sw, ncyc, tx0, c0;
      logic [31:0] ca[$];
      wr_reg(8'h04, 32'h240); wr_reg(8'h06, evctrl(1, 0, 2'd2, 3'b000));   // MODE -> cycle, address
      wr_reg(8'h08, 32'h300); wr_reg(8'h0A, evctrl(0, 1, 2'd1, 3'b000));   // STOP
      wr_reg(8'h01, 32'd40);
      wait_idle(5);
      tx0 = txq.size();
      wr_reg(8'h00, ctrlw(1, 1, 0, 3'b101, 0));   // start on arm, txn, address+data
      c0 = cyq.size();
      traffic(6);
      cmd(1, 32'h240, 1);
      n_mode_ev += (dut.mode == mode_t'(3'b000));
      traffic(2);
      cmd(0, 32'h300, 1);
      traffic(6);
      wait_idle(10);
      check(trc_done, "trace 2 done");
      unload(words);
      words_to_bits(words, 128, s);
      decode(s, 128, d, bad);
      check(!bad, "trace 2 decodes");
      count_samples(d);
      check(d.size() > 2 && d[0].is_mode && d[0].mode == 3'b101 && !d[0].comp, "trace 2 first mode");
      sw = -1;
      foreach (d[i]) if (i > 0 && d[i].is_mode) sw = i;
      check(sw > 0 && d[sw].mode == 3'b000, "mode packet on the switch");
      // transaction part: consecutive transfers from the first after arming
      for (int i = 1; i < sw; i++) begin
        check(d[i].txn && d[i].has_addr && d[i].has_data && !d[i].has_ctrl, "txn sample fields");
        check(tx0 + i - 1 < txq.size() && d[i].addr == txq[tx0 + i - 1].addr &&
              d[i].data == txq[tx0 + i - 1].data, "txn sample matches monitor");
      end
      // cycle part: 40 address-only samples, a contiguous run of bus cycles
      ncyc = 0;
      for (int i = sw + 1; i < d.size(); i++) begin
        check(!d[i].txn && d[i].has_addr && !d[i].has_data && !d[i].has_ctrl, "cycle sample fields");
        ca.push_back(d[i].addr);
        ncyc++;
      end
      check(ncyc >= 40, "cycle samples up to the depth");
      begin
        bit found;
        found = 0;
        for (int c = c0; c + ca.size() <= cyq.size() && !found; c++) begin
          bit ok;
          ok = 1;
          foreach (ca[k]) if (cyq[c + k].addr != ca[k]) begin ok = 0; break; end
          found = ok;
        end
        check(found, "cycle samples are consecutive bus cycles");
      end
    end

    // ================= trace 3: overload, loss marking, full memory stops
    begin
      bit s[$];
      dec_t d[$];
      bit bad;
      int c0, matched;
      wr_reg(8'h06, 32'h0); wr_reg(8'h0A, 32'h0);   // events off
      wait_idle(5);
      c0 = cyq.size();
      wr_reg(8'h00, ctrlw(1, 1, 0, 3'b010, 0));    // cycle level, full, no wrap
      wait_idle(2);
      while (!trc_done) traffic(1);
      n_full_stop += (trc_count >= 8'd120 && !trc_triggered);
      check(trc_count >= 8'd120 && trc_count <= 8'd128, "memory filled up to the margin");
      unload(words);
      words_to_bits(words, 128, s);
      decode(s, 128, d, bad);
      check(!bad, "trace 3 decodes");
      count_samples(d);
      check(trc_drop_cnt == 0, "no packet lost in the densest mode");
      // the samples must be a run of consecutive bus cycles after arming
      matched = 0;
      for (int c = c0; c + d.size() - 1 <= cyq.size() && matched != d.size() - 1; c++) begin
        matched = 0;
        for (int i = 1; i < d.size(); i++) begin
          if (cyq[c + i - 1].addr != d[i].addr || cyq[c + i - 1].data != d[i].data ||
              cyq[c + i - 1].ctrl != d[i].ctrl) break;
          matched++;
        end
      end
      check(d.size() > 100 && matched == d.size() - 1, "cycle samples are consecutive bus cycles");
    end

    // ================= trace 4: circular buffer, pre-trigger history
    begin
      bit exp[$];
      int i1, tx0, nbits, first;
      wr_reg(8'h08, 32'h300); wr_reg(8'h0A, evctrl(0, 1, 2'd1, 3'b000));
      wr_reg(8'h01, 32'd1);
      wait_idle(5);
      tx0 = txq.size();
      wr_reg(8'h00, ctrlw(1, 1, 1, 3'b101, 1));    // txn, address+data, wrap, compressed
      traffic(220);
      cmd(0, 32'h300, 1);
      wait_idle(20);
      check(trc_done, "trace 4 done");
      n_wrap += trc_overwritten;
      check(trc_overwritten && trc_count == 8'd128, "memory wrapped and is full");
      unload(words);
      i1 = find_txn(32'h300, 0, tx0);
      enc_mode(exp, 3'b101, 1);
      for (int i = tx0; i <= i1; i++) enc_sample(exp, 3'b101, 1, txq[i]);
      if (exp.size() % 128 != 0) n_pad_word++;
      nbits = ((exp.size() + 127) / 128) * 128;
      first = nbits - 128 * 128;
      check(words.size() == 128 && first > 0, "128 newest words kept");
      compare_words(words, exp, first, "trace 4 tail of the exact stream");
    end

    // ================= traces 5 and 6: the same program without and with
    // compression (transaction level, all fields): both exact streams, and
    // the compressed one shorter by 28 bits per dictionary hit
    begin
      int nbits [2], nsmp [2], nhit;
      for (int c = 0; c < 2; c++) begin
        bit exp[$];
        dec_t d[$];
        bit bad;
        int i0, i1, tx0;
        exp.delete();                       // static: clear for each run
        d.delete();
        wr_reg(8'h04, 32'h200); wr_reg(8'h06, evctrl(1, 0, 2'd0, 3'b110));   // START
        wr_reg(8'h08, 32'h300); wr_reg(8'h0A, evctrl(0, 1, 2'd1, 3'b000));   // STOP
        wr_reg(8'h01, 32'd1);
        wr_reg(8'h00, ctrlw(1, 0, 0, 3'b110, c[0]));
        wait_idle(5);
        tx0 = txq.size();
        cmd(1, 32'h200, 1);
        for (int k = 0; k < 8; k++) begin   // a loop: hot addresses and a cold one
          cmd(0, 32'h00, 4);
          cmd(1, 32'h20, 2);
          cmd(0, 32'h480 + 32'(8 * k), 2);
        end
        cmd(0, 32'h300, 1);
        wait_idle(20);
        check(trc_done, "trace 5/6 done");
        unload(words);
        i0 = find_txn(32'h200, 1, tx0);
        i1 = find_txn(32'h300, 0, i0);
        enc_mode(exp, 3'b110, c[0]);
        for (int i = i0; i <= i1; i++) enc_sample(exp, 3'b110, c[0], txq[i]);
        check(words.size() == (exp.size() + 127) / 128, "trace 5/6 word count");
        compare_words(words, exp, 0, (c == 1) ? "trace 6 exact compressed stream" : "trace 5 exact stream");
        nbits[c] = exp.size();
        nsmp[c]  = i1 - i0 + 1;
        exp.delete();
        words_to_bits(words, 128, exp);
        decode(exp, 128, d, bad);
        check(!bad, "trace 5/6 decodes");
        count_samples(d);
        if (c == 1) begin
          nhit = 0;
          foreach (d[i]) if (!d[i].is_mode && d[i].hit) nhit++;
        end
      end
      $display("same program: %0d samples, %0d bits uncompressed, %0d bits compressed (%0d hits)",
               nsmp[1], nbits[0], nbits[1], nhit);
      check(nsmp[0] == 66 && nsmp[1] == 66, "both traces hold the whole program");
      check(nhit == 48 && nbits[0] - nbits[1] == 28 * nhit, "compression saves 28 bits per hit");
      n_comp_saved += (nbits[1] < nbits[0]);
    end

    // ---- mechanisms ----
    $display("start %0d stop %0d mode-event %0d | dict hit %0d miss %0d | mode pkts %0d",
             n_start_ev, n_stop_ev, n_mode_ev, n_dict_hit, n_dict_miss, n_mode_pkt);
    $display("txn samples %0d cycle samples %0d | loss marks %0d drops %0d | full-stop %0d wrap %0d",
             n_txn_smp, n_cyc_smp, n_loss, trc_drop_cnt, n_full_stop, n_wrap);
    $display("padded last words %0d | traced ERROR %0d | wait cycles %0d | trace-out stalls %0d",
             n_pad_word, n_err_traced, wait_cycles, n_tout_stall);
    check(n_start_ev > 0, "mechanism: START event");
    check(n_stop_ev > 0, "mechanism: STOP event / trigger");
    check(n_mode_ev > 0, "mechanism: MODE event");
    check(n_dict_hit > 0, "mechanism: dictionary hit");
    check(n_dict_miss > 0, "mechanism: dictionary miss");
    check(n_mode_pkt > 0, "mechanism: mode packet");
    check(n_txn_smp > 0, "mechanism: transaction-level sample");
    check(n_cyc_smp > 0, "mechanism: cycle-level sample");
    check(n_loss == 0, "no loss mark at the default memory width");
    check(n_full_stop > 0, "mechanism: full memory ends trace");
    check(n_wrap > 0, "mechanism: circular overwrite");
    check(n_pad_word > 0, "mechanism: padded last word");
    check(n_err_traced > 0, "mechanism: ERROR response traced");
    check(wait_cycles > 0, "mechanism: wait states");
    check(n_tout_stall > 0, "mechanism: trace-out back-pressure");
    check(n_comp_saved > 0, "mechanism: compression shortens the same trace");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge HCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule


