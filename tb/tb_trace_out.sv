// tb_trace_out: connects trace_out to a small FIFO model with one cycle of
// read latency, fills it with numbered words and takes them with a random
// out_ready. Checks that every word arrives once and in order, that a word on
// offer is held until taken, that nothing is read while enable is low, and
// the throughput of one word per three cycles with out_ready held high.
module tb_trace_out;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable = 0, mem_empty, mem_rd_en, out_valid, out_ready = 0;
  logic [W-1:0] mem_rdata, out_data;

  trace_out #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // FIFO model with registered read
  logic [W-1:0] fifo [$];
  int next_fill = 0;
  assign mem_empty = (fifo.size() == 0);
  always @(posedge clk) if (mem_rd_en) mem_rdata <= fifo.pop_front();

  int expect_n = 0;
  int taken_cycles [$];
  int cycle = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && !enable) check(!mem_rd_en, "no read while disabled");
    if (out_valid && out_ready) begin
      check(out_data == 32'hC0DE_0000 + expect_n, "word order");
      expect_n++;
      taken_cycles.push_back(cycle);
    end
  end
  logic [W-1:0] held;
  logic         was_stalled = 0;
  always @(posedge clk) begin
    if (was_stalled) check(out_valid && out_data == held, "held while stalled");
    was_stalled <= out_valid && !out_ready;
    held <= out_data;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) fifo.push_back(32'hC0DE_0000 + next_fill++);
    repeat (10) @(posedge clk);
    check(expect_n == 0, "nothing out while disabled");
    enable <= 1;
    for (int n = 0; n < 400; n++) begin
      out_ready <= 1'($urandom);
      if (n == 200) for (int i = 0; i < 30; i++) fifo.push_back(32'hC0DE_0000 + next_fill++);
      @(posedge clk);
    end
    // throughput with out_ready high
    for (int i = 0; i < 20; i++) fifo.push_back(32'hC0DE_0000 + next_fill++);
    out_ready <= 1;
    taken_cycles.delete();
    repeat (100) @(posedge clk);
    check(expect_n == next_fill, "all words delivered");
    check(taken_cycles.size() == 20 && taken_cycles[19] - taken_cycles[0] == 3 * 19,
          "one word every three cycles");
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
