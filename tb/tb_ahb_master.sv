// tb_ahb_master: drives random write and read commands through ahb_master
// into the behavioural slave (random wait states, random grant withdrawal)
// and checks: every accepted address phase has the expected address and
// direction, the first beat of a command is NONSEQ, address and control
// hold while HREADY is low, each command issues exactly its beats, read data
// equals what earlier writes stored, and a transfer answered with ERROR ends
// the command with error set.
module tb_ahb_master;
  import tracer_pkg::*;

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
  logic rd_valid, done, error;
  logic [31:0] rd_data;
  int wait_cycles, errs;

  ahb_master dut (.*);
  ahb_slave_model #(.ERR_ADDR(32'h0000_0F00)) slv (
    .HCLK, .HRESETn, .HBUSREQ, .HTRANS, .HADDR, .HWRITE, .HWDATA,
    .HGRANT, .HREADY, .HRESP, .HRDATA, .wait_cycles, .errors(errs));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // expected memory contents (slave starts with A5A5_0000 + word index)
  logic [31:0] exp_mem [int];
  function automatic logic [31:0] expect_word(int widx);
    return exp_mem.exists(widx) ? exp_mem[widx] : 32'hA5A5_0000 + widx;
  endfunction

  // address phase monitor
  int          aphase_cnt;
  logic [31:0] exp_addr;
  logic        exp_write;
  logic        in_cmd;
  logic [1:0]  prev_htrans;
  logic [31:0] prev_haddr;
  logic        prev_hready = 1'b1, prev_err = 1'b0;  // no wait state before reset ends
  int          nonseq_cnt, seq_cnt, regrant_cnt;
  always @(posedge HCLK) if (HRESETn) begin
    if (!prev_hready && !prev_err) begin
      check(HTRANS == prev_htrans && HADDR == prev_haddr, "address held in wait state");
    end
    if (HREADY && HTRANS[1]) begin
      check(HADDR == exp_addr + 32'(4 * aphase_cnt), "burst address");
      check(HWRITE == exp_write, "direction");
      if (aphase_cnt == 0) check(HTRANS == TR_NONSEQ, "first beat NONSEQ");
      if (HTRANS == TR_NONSEQ) nonseq_cnt++; else seq_cnt++;
      if (HTRANS == TR_NONSEQ && aphase_cnt != 0) regrant_cnt++;
      aphase_cnt++;
    end
    prev_htrans <= HTRANS;
    prev_haddr  <= HADDR;
    prev_hready <= HREADY;
    prev_err    <= (HRESP != 2'b00);
  end

  task automatic run_cmd(bit wr, logic [31:0] addr, int beats, logic [31:0] wd, bit expect_err);
    int rcount = 0;
    @(posedge HCLK);
    while (!cmd_ready) @(posedge HCLK);
    cmd_valid <= 1; cmd_write <= wr; cmd_addr <= addr; cmd_beats <= 8'(beats); cmd_wdata <= wd;
    exp_addr = addr; exp_write = wr; aphase_cnt = 0;
    @(posedge HCLK);
    cmd_valid <= 0;
    forever begin
      @(posedge HCLK);
      if (rd_valid) begin
        check(rd_data == expect_word(int'(addr[11:2]) + rcount), "read data");
        rcount++;
      end
      if (done) break;
    end
    check(error == expect_err, "error flag");
    if (!expect_err) begin
      check(aphase_cnt == beats, "beat count");
      if (!wr) check(rcount == beats, "read beats returned");
      if (wr) for (int i = 0; i < beats; i++) exp_mem[int'(addr[11:2]) + i] = wd + 32'(i);
    end
  endtask

  initial begin
    repeat (3) @(posedge HCLK);
    HRESETn = 1;
    for (int n = 0; n < 40; n++) begin
      logic [31:0] a;
      int b;
      a = {20'h0, 2'b00, 8'($urandom), 2'b00};  // below 0x400
      b = 1 + $urandom % 8;
      run_cmd(1, a, b, $urandom, 0);
      run_cmd(0, a, b, 0, 0);
      run_cmd(0, {20'h0, 2'b00, 8'($urandom), 2'b00}, 1 + $urandom % 8, 0, 0);
    end
    // a burst that runs into the error address
    run_cmd(0, 32'h0000_0EF8, 5, 0, 1);
    check(errs == 1, "slave saw one error");
    // still working afterwards
    run_cmd(1, 32'h10, 4, 32'h1234_0000, 0);
    run_cmd(0, 32'h10, 4, 0, 0);
    check(wait_cycles > 0, "wait states happened");
    check(seq_cnt > 0 && nonseq_cnt > 0, "NONSEQ and SEQ seen");
    $display("wait cycles %0d, nonseq %0d, seq %0d, re-grant restarts %0d",
             wait_cycles, nonseq_cnt, seq_cnt, regrant_cnt);
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
