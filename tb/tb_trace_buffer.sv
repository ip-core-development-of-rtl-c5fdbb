// tb_trace_buffer: two instances see the same packets: one with 32-bit
// words, one at the default 128-bit width. Phase 1 sends five traces of
// random-length packets at random rates low enough that none can be lost,
// each ended by a flush, and checks for each trace, word by word, that the
// 32-bit words form exactly the concatenated packet bits, that the flush
// writes the remaining bits as one zero-padded word in one extra cycle, and
// the word count. Phase 2 sends a 99-bit sample packet every cycle. The
// 32-bit instance is overloaded: decoding its words must give an in-order
// subset of the packets sent, the missing ones must equal drop_cnt, and the
// loss bit must be set exactly on the packets that follow a gap. The 128-bit
// instance must keep every packet.
module tb_trace_buffer;
  import tracer_pkg::*;
  import trace_decode_pkg::*;

  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0;
  pkt_t pkt;
  logic wr_en, empty;
  logic [W-1:0] wdata;
  logic [15:0] drop_cnt;

  trace_buffer #(.W(W), .BUF_BITS(256)) dut (.*);

  // default width: keeps up with a full-size packet every cycle
  logic         wr_en_d, empty_d;
  logic [127:0] wdata_d;
  logic [15:0]  drop_cnt_d;
  trace_buffer dut_d (.clk, .rst_n, .clear, .pkt, .wr_en(wr_en_d), .wdata(wdata_d),
                      .empty(empty_d), .drop_cnt(drop_cnt_d));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  bit [127:0] words [$], words_d [$];
  int  last_wr_cycle, cycle;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && wr_en) begin
      words.push_back(128'(wdata));
      last_wr_cycle <= cycle;
    end
    if (rst_n && wr_en_d) words_d.push_back(wdata_d);
  end

  initial begin
    bit sent [$];
    bit got [$];
    int flush_cycle, n_flush;
    n_flush = 0;
    cycle = 0;
    pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- phase 1: exact bit streams, five traces ----
    for (int t = 0; t < 5; t++) begin
      int npk, rate, bad_words;
      sent.delete();
      got.delete();
      words.delete();
      npk  = 20 + $urandom % 100;
      rate = 2 + $urandom % 3;                 // a packet every 2..4 cycles
      for (int n = 0; n < npk; n++) begin
        pkt_t p;
        int len;
        len = 1 + $urandom % PKT_MAX;
        p = '0;
        p.valid = ((n % rate) == 0) || (n == npk - 1);
        p.len = LEN_W'(len);
        for (int i = 0; i < len; i++) p.bits[i] = 1'($urandom);
        p.bits[HDR_LOSS_BIT] = (len > HDR_LOSS_BIT) ? p.bits[HDR_LOSS_BIT] : 1'b0;
        p.flush = (n == npk - 1);
        if (p.valid) for (int i = 0; i < len; i++) sent.push_back(p.bits[i]);
        pkt <= p;
        @(posedge clk);
      end
      flush_cycle = cycle;
      pkt <= '0;
      repeat (20) @(posedge clk);
      check(drop_cnt == 0, "no drops at low rate");
      check(empty, "empty after flush");
      check(words.size() == (sent.size() + W - 1) / W, "word count incl. padded last word");
      check(last_wr_cycle - flush_cycle <= (sent.size() % 256 + W - 1) / W + 2, "remainder written promptly");
      foreach (words[i]) for (int b = 0; b < W; b++) got.push_back(words[i][b]);
      bad_words = 0;
      for (int w = 0; w < words.size(); w++) begin
        bit ok;
        ok = 1;
        for (int b = w * W; b < (w + 1) * W; b++)
          if (got[b] != ((b < sent.size()) ? sent[b] : 1'b0)) ok = 0;
        check(ok, "word holds the next stream bits (padding zero)");
      end
      n_flush++;
    end
    check(n_flush == 5, "five flushes");

    // ---- phase 2: overload, drop and loss marking ----
    clear <= 1; @(posedge clk); clear <= 0;
    words.delete();
    words_d.delete();
    for (int n = 0; n < 200; n++) begin
      pkt_t p;
      p = '0;
      p.valid = 1;
      p.len = LEN_W'(8 + 32 + 32 + 19);
      p.bits[1:0] = PT_SAMPLE;
      p.bits[2] = 1; p.bits[4] = 1; p.bits[5] = 1;
      p.bits[8 +: 32]  = 32'h1000 + n;
      p.bits[40 +: 32] = n;
      p.flush = (n == 199);
      pkt <= p;
      @(posedge clk);
    end
    pkt <= '0;
    repeat (40) @(posedge clk);
    begin
      bit s[$];
      dec_t d[$];
      bit bad;
      int prev;
      int gaps, lossbits;
      words_to_bits(words, W, s);
      decode(s, W, d, bad);
      check(!bad, "overload stream decodes");
      check(drop_cnt > 0, "drops happened");
      check(d.size() + int'(drop_cnt) == 200, "decoded + dropped = sent");
      prev = -1; gaps = 0; lossbits = 0;
      foreach (d[i]) begin
        check(int'(d[i].data) > prev && d[i].addr == 32'h1000 + d[i].data, "order and content");
        check(d[i].loss == (int'(d[i].data) != prev + 1), "loss bit marks gaps");
        if (int'(d[i].data) != prev + 1) gaps++;
        if (d[i].loss) lossbits++;
        prev = int'(d[i].data);
      end
      $display("phase 2: %0d decoded, %0d dropped, %0d gaps", d.size(), drop_cnt, gaps);
      // the default width keeps everything
      s.delete();
      d.delete();
      words_to_bits(words_d, 128, s);
      decode(s, 128, d, bad);
      check(!bad && drop_cnt_d == 0 && d.size() == 200, "128-bit words: all 200 packets kept");
      foreach (d[i]) check(d[i].data == i && !d[i].loss, "128-bit words: in order, no loss mark");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
