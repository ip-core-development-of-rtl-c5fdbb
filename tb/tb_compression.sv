// tb_compression: feeds random records, half of them with addresses from the
// default dictionary (word addresses 0x00..0x3C), with compression switched
// on and off, and checks two cycles later that a dictionary address comes out
// as its 4-bit index (address / 4) with addr_hit set, that every other
// address, records without an address and all records with compression off
// pass unchanged, and that data, control, mode and flush are carried along.
module tb_compression;
  import tracer_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic comp_en = 0;
  abs_rec_t rec_in;
  cmp_rec_t rec_out;

  compression dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  cmp_rec_t exp_q [$];
  int hits = 0, misses = 0;

  initial begin
    rec_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      abs_rec_t r;
      cmp_rec_t e;
      bit en;
      r = '0;
      r.valid    = 1'($urandom);
      r.flush    = ($urandom % 16) == 0;
      r.mode     = mode_t'($urandom);
      r.has_addr = ($urandom % 4) != 0;
      r.has_data = 1'($urandom);
      r.has_ctrl = 1'($urandom);
      case ($urandom % 4)
        0, 1:    r.addr = 32'(4 * ($urandom % 16));
        2:       r.addr = 32'h40 + 32'($urandom % 64);        // just past the table
        default: r.addr = $urandom;
      endcase
      if (!r.has_addr) r.addr = 0;
      r.data = $urandom;
      r.ctrl = ahb_ctrl_t'($urandom);
      en = ($urandom % 8) != 0;
      // expected
      e = '0;
      e.valid = r.valid; e.flush = r.flush; e.mode = r.mode; e.comp_en = en;
      e.has_addr = r.has_addr; e.has_data = r.has_data; e.has_ctrl = r.has_ctrl;
      e.data = r.data; e.ctrl = r.ctrl;
      e.addr_hit = en && r.has_addr && r.addr < 32'h40 && r.addr[1:0] == 0;
      e.addr = e.addr_hit ? (r.addr >> 2) : r.addr;
      if (e.addr_hit) hits++; else misses++;
      exp_q.push_back(e);
      rec_in  = r;
      comp_en = en;
      @(posedge clk);
      #1;
      if (n >= 1) begin
        cmp_rec_t x;
        x = exp_q.pop_front();
        check(rec_out == x, "compressed record");
        if (rec_out != x) $display("  got %h exp %h", rec_out, x);
      end
    end
    check(hits > 300 && misses > 300, "hits and misses exercised");
    $display("dictionary hits %0d misses %0d", hits, misses);
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
