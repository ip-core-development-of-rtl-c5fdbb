// tb_packet_gen: sends random compressed records and decodes every packet
// with the reference decoder. Checks the packet length, the sample header
// and its fields (4-bit index on a dictionary hit, full address otherwise,
// data, control), and that a mode packet with the right mode and compression
// bit precedes the sample exactly when the mode or compression enable
// changed, on the first record and on the first record after a flush. The
// packet must appear one cycle after its record.
module tb_packet_gen;
  import tracer_pkg::*;
  import trace_decode_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cmp_rec_t rec;
  pkt_t pkt;

  packet_gen dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  int mode_pkts = 0, samples = 0;
  initial begin
    cmp_rec_t r;
    bit [2:0] last_mode;
    bit last_comp, need;
    last_mode = 0; last_comp = 0; need = 1;
    rec = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      bit exp_mode;
      int exp_len;
      r = '0;
      r.valid = ($urandom % 4) != 0;
      r.flush = ($urandom % 40) == 0;
      r.mode  = (($urandom % 8) == 0) ? mode_t'($urandom) : mode_t'(last_mode);
      r.comp_en = (($urandom % 10) == 0) ? 1'($urandom) : last_comp;
      r.has_addr = 1'($urandom); r.has_data = 1'($urandom); r.has_ctrl = 1'($urandom);
      r.addr_hit = r.has_addr && 1'($urandom);
      r.addr = r.addr_hit ? 32'($urandom % 16) : $urandom;
      r.data = $urandom;
      r.ctrl = ahb_ctrl_t'($urandom);
      exp_mode = r.valid && (need || r.mode != last_mode || r.comp_en != last_comp);
      exp_len = (exp_mode ? 16 : 8) + (r.has_addr ? (r.addr_hit ? 4 : 32) : 0) +
                (r.has_data ? 32 : 0) + (r.has_ctrl ? 19 : 0);
      rec = r;
      @(posedge clk);
      #1;
      check(pkt.valid == r.valid && pkt.flush == r.flush, "valid/flush one cycle later");
      if (r.valid) begin
        bit s[$];
        dec_t d[$];
        bit bad;
        s.delete();
        d.delete();
        check(int'(pkt.len) == exp_len, "packet length");
        for (int i = 0; i < int'(pkt.len); i++) s.push_back(pkt.bits[i]);
        decode(s, 1024, d, bad);
        check(!bad && d.size() == (exp_mode ? 2 : 1), "packet count");
        if (failures < 3 && d.size() != (exp_mode ? 2 : 1)) $display("bad=%0d n=%0d len=%0d exp_mode=%0d %p", bad, d.size(), pkt.len, exp_mode, r);
        if (!bad && d.size() == (exp_mode ? 2 : 1)) begin
          dec_t sm;
          if (exp_mode) begin
            mode_pkts++;
            check(d[0].is_mode && d[0].mode == r.mode && d[0].comp == r.comp_en, "mode packet");
          end
          sm = d[d.size() - 1];
          samples++;
          check(!sm.is_mode && sm.txn == r.mode.txn && sm.has_addr == r.has_addr &&
                sm.hit == r.addr_hit && sm.has_data == r.has_data && sm.has_ctrl == r.has_ctrl,
                "sample header");
          if (r.has_addr) check(sm.addr == r.addr, "address field");
          if (r.has_data) check(sm.data == r.data, "data field");
          if (r.has_ctrl) check(sm.ctrl == r.ctrl, "control field");
        end
        for (int i = int'(pkt.len); i < PKT_MAX; i++) if (pkt.bits[i]) begin
          check(0, "bits beyond the packet are zero");
          break;
        end
        last_mode = r.mode; last_comp = r.comp_en; need = 0;
      end
      if (r.flush) need = 1;
    end
    check(mode_pkts > 50 && samples > 1000, "mode packets and samples exercised");
    $display("mode packets %0d samples %0d", mode_pkts, samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
