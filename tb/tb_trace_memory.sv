// tb_trace_memory: random writes and reads against a queue model. Without
// wrap, writes to a full memory are discarded; with wrap they replace the
// oldest word (the model drops its front) and 'overwritten' is set. Checks
// read data one cycle after rd_en, count, empty, full and almost_full
// (AFULL_MARGIN = 8 free words), simultaneous read
// and write at full, and clear.
module tb_trace_memory;
  localparam int W = 32, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, wrap = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic empty, full, almost_full, overwritten;
  logic [$clog2(DEPTH+1)-1:0] count;

  trace_memory #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [W-1:0] model [$];
  int full_writes = 0, wraps = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      wrap = phase[0];
      clear <= 1; @(posedge clk); clear <= 0; @(posedge clk); #1;
      model.delete();
      for (int n = 0; n < 3000; n++) begin
        bit w, r, rd_ok;
        logic [W-1:0] d, exp;
        // bias towards filling in the first half, draining in the second
        w = ($urandom % 100) < ((n % 400) < 200 ? 80 : 30);
        r = ($urandom % 100) < ((n % 400) < 200 ? 30 : 80);
        d = $urandom;
        wr_en <= w; rd_en <= r; wdata <= d;
        check(int'(count) == model.size() && empty == (model.size() == 0) &&
              full == (model.size() == DEPTH), "count/empty/full");
        check(almost_full == (model.size() >= DEPTH - 8), "almost_full at 8 free words");
        rd_ok = r && model.size() > 0;
        if (rd_ok) exp = model.pop_front();
        if (w) begin
          if (model.size() < DEPTH) model.push_back(d);
          else if (wrap) begin
            void'(model.pop_front()); model.push_back(d); wraps++;
          end else full_writes++;
        end
        @(posedge clk);
        #1;
        if (rd_ok) check(rdata == exp, "read data");
      end
      wr_en <= 0; rd_en <= 0;
      @(posedge clk);
      check(overwritten == (wraps > 0), "overwritten flag");
    end
    check(full_writes > 0 && wraps > 0, "full memory exercised both ways");
    clear <= 1; @(posedge clk); clear <= 0; #1;
    check(empty && count == 0 && !overwritten, "clear");
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
