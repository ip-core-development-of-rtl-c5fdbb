// tb_event_gen: programs the event registers through the register port,
// plays address phases on the observed bus and checks the trace control:
// START only on a matching address and direction (mask honoured), STOP as
// trigger followed by exactly DEPTH samples, DEPTH 0, MODE events switching
// the mode on the fly, start-on-arm, software stop, and the end of a trace on
// a full memory without wrap (but not with wrap). Cycle timing is checked:
// a hit in cycle t shows in cycle t+1. Finally 20 rounds of random event
// registers and random address phases check every hit against a model of
// the matching circuit, and the priority of simultaneous MODE events.
module tb_event_gen;
  import tracer_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  ahb_obs_t obs;
  logic sample_take, mem_full = 0;
  logic trace_en, comp_en, wrap, clear, stop, armed, triggered;
  mode_t mode;
  logic [1:0] ev_hit;
  logic take_req = 0;

  event_gen #(.NUM_EVENTS(2)) dut (.*);
  assign sample_take = trace_en && take_req;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int stop_pulses = 0, clear_pulses = 0;
  always @(posedge clk) begin
    #2;
    if (stop)  stop_pulses++;
    if (clear) clear_pulses++;
  end

  task automatic wr_reg(logic [7:0] a, logic [31:0] d);
    cfg_we <= 1; cfg_addr <= a; cfg_wdata <= d;
    @(posedge clk);
    cfg_we <= 0;
  endtask
  // register write driven away from the clock edge (back-to-back safe)
  task automatic wr_reg_n(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask
  function automatic logic [31:0] evctrl(bit w, bit r, logic [1:0] act, logic [2:0] m);
    return {24'h0, m, act, r, w, 1'b1};
  endfunction
  function automatic logic [31:0] ctrlw(bit arm, bit soa, bit wr, logic [2:0] m, bit c);
    return {25'h0, c, m, wr, soa, arm};
  endfunction

  // one cycle on the bus: an accepted address phase or idle
  task automatic bus(bit active, logic [31:0] a, bit w);
    obs = '0;
    obs.ctrl.hready = 1;
    obs.haddr = a;
    obs.ctrl.hwrite = w;
    obs.ctrl.htrans = active ? TR_NONSEQ : TR_IDLE;
    @(posedge clk);
    #3;
    obs = '0;
    obs.ctrl.hready = 1;
  endtask

  initial begin
    obs = '0; obs.ctrl.hready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // ev0: START on write to 0x100, mode {txn, FULL}
    wr_reg(8'h04, 32'h100); wr_reg(8'h05, 32'hFFFF_FFFF); wr_reg(8'h06, evctrl(1, 0, 2'd0, 3'b110));
    // ev1: STOP on read to 0x200..0x20F
    wr_reg(8'h08, 32'h200); wr_reg(8'h09, 32'hFFFF_FFF0); wr_reg(8'h0A, evctrl(0, 1, 2'd1, 3'b000));
    wr_reg(8'h01, 32'd3);
    wr_reg(8'h00, ctrlw(1, 0, 0, 3'b000, 1));
    #3;
    check(clear_pulses == 1, "clear on arm");
    check(armed && !trace_en, "armed, not tracing");
    check(comp_en && !wrap, "config bits");
    bus(1, 32'h100, 0);  #0 check(!trace_en, "read does not start");
    bus(1, 32'h104, 1);  #0 check(!trace_en, "other address does not start");
    bus(0, 32'h100, 1);  #0 check(!trace_en, "idle does not start");
    bus(1, 32'h100, 1);
    check(trace_en, "start event starts the trace next cycle");
    check(mode == mode_t'(3'b110), "start event sets its mode");
    take_req = 1;
    repeat (5) bus(0, 0, 0);
    check(trace_en && !triggered, "still tracing");
    take_req = 0;
    bus(1, 32'h20C, 0);
    check(triggered && trace_en, "trigger seen, post-trigger tracing");
    // three samples after the trigger, spread over idle cycles
    bus(0, 0, 0); check(trace_en, "post 0");
    take_req = 1; bus(0, 0, 0); take_req = 0; check(trace_en, "post 1");
    bus(0, 0, 0);
    take_req = 1; bus(0, 0, 0); check(trace_en, "post 2");
    check(stop_pulses == 0, "no stop yet");
    bus(0, 0, 0); take_req = 0;
    check(!trace_en, "stopped after DEPTH samples");
    check(stop_pulses == 1, "one stop pulse");
    repeat (3) bus(1, 32'h100, 1);
    check(!trace_en, "done: start event ignored");

    // start on arm, MODE event, software stop
    wr_reg(8'h0A, evctrl(1, 0, 2'd2, 3'b001));   // ev1: MODE on write 0x200..
    wr_reg(8'h00, ctrlw(1, 1, 1, 3'b010, 0));
    #3 check(trace_en && mode == mode_t'(3'b010) && wrap && !comp_en, "start on arm with initial mode");
    bus(1, 32'h208, 0); check(mode == mode_t'(3'b010), "mode event needs a write");
    bus(1, 32'h208, 1); check(mode == mode_t'(3'b001), "mode event switches mode");
    mem_full = 1;
    repeat (3) bus(0, 0, 0);
    check(trace_en, "full memory with wrap keeps tracing");
    mem_full = 0;
    wr_reg(8'h00, ctrlw(0, 0, 1, 3'b010, 0));
    #3 check(!trace_en && stop_pulses == 2, "software stop");

    // full memory without wrap ends the trace; DEPTH 0
    wr_reg(8'h00, ctrlw(1, 1, 0, 3'b000, 0));
    bus(0, 0, 0);
    mem_full = 1; bus(0, 0, 0); mem_full = 0;
    check(!trace_en && stop_pulses == 3, "full memory stops the trace");
    wr_reg(8'h01, 32'd0);
    wr_reg(8'h0A, evctrl(1, 1, 2'd1, 3'b000));   // ev1: STOP on any direction
    wr_reg(8'h00, ctrlw(1, 1, 0, 3'b000, 0));
    bus(1, 32'h201, 1);
    check(!trace_en && stop_pulses == 4 && triggered, "depth 0 stops at once");
    check(clear_pulses == 4, "clear per arm");

    // random matching: both events as MODE events with random address, mask
    // and directions, compared with a model of the matching circuit; the
    // mode must follow the lowest-numbered hitting event one cycle later
    begin
      logic [31:0] ea [2], em [2];
      bit ew [2], er [2];
      mode_t emode [2], exp_mode;
      int nhit [2], nboth, nmiss;
      nhit[0] = 0; nhit[1] = 0; nboth = 0; nmiss = 0;
      for (int round = 0; round < 20; round++) begin
        for (int k = 0; k < 2; k++) begin
          ea[k] = $urandom;
          em[k] = $urandom | 32'hF000_0000;
          if (round % 5 == 4) em[k] = 32'h0;            // mask 0: any address
          ew[k] = 1'($urandom); er[k] = 1'($urandom);
          emode[k] = mode_t'(3'(2 * round + k));
          wr_reg_n(8'(4 + 4 * k), ea[k]);
          wr_reg_n(8'(5 + 4 * k), em[k]);
          wr_reg_n(8'(6 + 4 * k), evctrl(ew[k], er[k], 2'd2, emode[k]));
        end
        wr_reg_n(8'h00, ctrlw(1, 1, 1, 3'b011, 0));      // trace from arming, wrap
        exp_mode = mode_t'(3'b011);
        @(posedge clk);
        #3 check(trace_en && mode == exp_mode, "random round starts");
        for (int n = 0; n < 50; n++) begin
          logic [31:0] a;
          int e, b;
          bit w, act, h [2];
          // a matching address, a near miss (one compared bit flipped) or
          // a random one
          e   = (n / 2) % 2;
          b   = $urandom % 32;
          if (!em[e][b]) b = 28 + b % 4;                 // mask bits 31:28 are set (or mask 0)
          a   = ea[e] ^ ($urandom & ~em[e]);
          if (n % 3 == 1) a[b] = ~a[b];
          if (n % 3 == 2 && n % 5 == 0) a = $urandom;
          w   = 1'($urandom);
          act = ($urandom % 8) != 0;
          obs = '0;
          obs.ctrl.hready = 1;
          obs.haddr = a;
          obs.ctrl.hwrite = w;
          obs.ctrl.htrans = act ? TR_SEQ : TR_BUSY;
          #1;
          for (int k = 0; k < 2; k++) begin
            h[k] = act && ((a & em[k]) == (ea[k] & em[k])) && (w ? ew[k] : er[k]);
            nhit[k] += h[k];
          end
          nboth += h[0] && h[1];
          nmiss += (n % 3 == 1) && !h[0] && !h[1];
          check(ev_hit == {h[1], h[0]}, "matching circuit");
          if (h[0]) exp_mode = emode[0];
          else if (h[1]) exp_mode = emode[1];
          @(posedge clk);
          #3 check(mode == exp_mode && trace_en, "mode follows the lowest-numbered hit");
        end
        obs = '0; obs.ctrl.hready = 1;
      end
      $display("random matching: hits %0d/%0d, both %0d, near misses %0d", nhit[0], nhit[1], nboth, nmiss);
      check(nhit[0] > 50 && nhit[1] > 50 && nboth > 0 && nmiss > 100, "random matching exercised");
    end
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
