// event_gen: Event Generation Module of the AHB bus tracer.
//
// Decides when a trace starts and stops and which trace mode is in force.
// Software writes event registers through a simple synchronous register port
// (cfg_we, cfg_addr, cfg_wdata). Each of the NUM_EVENTS event registers holds
// an address, an address mask and a control word; a matching circuit compares
// every accepted AHB address phase (HTRANS NONSEQ or SEQ with HREADY high)
// against all of them at once:
//     hit_k = enable_k & ((HADDR ^ addr_k) & mask_k) == 0 & direction matches
// The control word of an event names its action:
//   START  - begin tracing (when armed) and switch to the event's mode
//   STOP   - the trigger: keep tracing DEPTH more samples, then stop
//   MODE   - switch the trace mode on the fly (new signal level / timing)
//
// Register map (cfg_addr, word addressed):
//   0x00 CTRL  [0] arm (1 arms and clears the trace, 0 stops a running trace)
//              [1] start on arm (trace from arming, no START event needed)
//              [2] wrap: the trace memory overwrites its oldest words when
//                  full, so the trace ends with the samples before the
//                  trigger; without wrap a full memory ends the trace
//              [5:3] initial mode {txn, level[1:0]}   [6] compression enable
//   0x01 DEPTH [15:0] samples traced after the STOP event (post-trigger depth)
//   0x04+4k EV_ADDR k, 0x05+4k EV_MASK k (1 = compare the bit),
//   0x06+4k EV_CTRL k: [0] enable [1] match writes [2] match reads
//                      [4:3] action (0 start, 1 stop, 2 mode) [7:5] mode
//
// Timing: a hit seen in an address phase at cycle t takes effect from cycle
// t+1 (trace_en and mode are registered). sample_take, from the abstraction
// stage, counts post-trigger samples, so exactly DEPTH samples follow the
// trigger. stop is a one-cycle pulse in the first cycle after the trace ends;
// clear is a one-cycle pulse when the trace is armed.
//
// The document gives the job of this module (start/stop time, trace mode,
// trace depth, event registers with a matching circuit); the register map,
// the action encoding and the number of events are this design's own.
module event_gen
  import tracer_pkg::*;
#(
  parameter int NUM_EVENTS = 2,
  parameter int DEPTH_W    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // register port
  input  logic        cfg_we,
  input  logic [7:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  // bus activity
  input  ahb_obs_t    obs,
  input  logic        sample_take,   // abstraction takes a sample this cycle
  input  logic        mem_full,      // trace memory (almost) full, matters without wrap
  // control to the following stages
  output logic        trace_en,
  output mode_t       mode,
  output logic        comp_en,
  output logic        wrap,
  output logic        clear,
  output logic        stop,
  // status
  output logic        armed,
  output logic        triggered,
  output logic [NUM_EVENTS-1:0] ev_hit
);

  typedef enum logic [2:0] {S_IDLE, S_ARMED, S_TRACE, S_POST, S_DONE} state_e;

  typedef struct packed {
    logic [AW-1:0] addr;
    logic [AW-1:0] mask;
    logic [7:0]    ctrl;
  } event_reg_t;

  state_e             state;
  event_reg_t         ev [NUM_EVENTS];
  mode_t              init_mode;
  logic [DEPTH_W-1:0] depth;
  logic [DEPTH_W-1:0] post_cnt;

  // ---- matching circuit ------------------------------------------------
  wire addr_phase = obs.ctrl.hready &&
                    (obs.ctrl.htrans == TR_NONSEQ || obs.ctrl.htrans == TR_SEQ);

  logic  hit_start, hit_stop, hit_mode;
  mode_t start_mode, new_mode;

  always_comb begin
    hit_start  = 1'b0;
    hit_stop   = 1'b0;
    hit_mode   = 1'b0;
    start_mode = init_mode;
    new_mode   = init_mode;
    for (int k = NUM_EVENTS - 1; k >= 0; k--) begin
      ev_hit[k] = ev[k].ctrl[0] && addr_phase &&
                  (((obs.haddr ^ ev[k].addr) & ev[k].mask) == '0) &&
                  (obs.ctrl.hwrite ? ev[k].ctrl[1] : ev[k].ctrl[2]);
      if (ev_hit[k]) begin
        // the lowest-numbered event wins when several give a mode
        unique case (ev_action_e'(ev[k].ctrl[4:3]))
          ACT_START: begin hit_start = 1'b1; start_mode = mode_t'(ev[k].ctrl[7:5]); end
          ACT_STOP:  hit_stop = 1'b1;
          ACT_MODE:  begin hit_mode = 1'b1; new_mode = mode_t'(ev[k].ctrl[7:5]); end
          default: ;
        endcase
      end
    end
  end

  // ---- control state machine -------------------------------------------
  wire cfg_ctrl  = cfg_we && cfg_addr == REG_CTRL;
  wire end_trace = (state == S_POST && sample_take && post_cnt <= DEPTH_W'(1)) ||
                   ((state == S_TRACE || state == S_POST) && mem_full && !wrap);

  assign trace_en  = (state == S_TRACE) || (state == S_POST);
  assign armed     = (state != S_IDLE) && (state != S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      init_mode    <= '0;
      comp_en      <= 1'b0;
      wrap         <= 1'b0;
      depth        <= '0;
      post_cnt     <= '0;
      mode         <= '0;
      clear        <= 1'b0;
      stop         <= 1'b0;
      triggered    <= 1'b0;
      for (int k = 0; k < NUM_EVENTS; k++) ev[k] <= '0;
    end else begin
      clear <= 1'b0;
      stop  <= 1'b0;

      // register writes
      if (cfg_we) begin
        if (cfg_addr == REG_DEPTH) depth <= cfg_wdata[DEPTH_W-1:0];
        for (int k = 0; k < NUM_EVENTS; k++) begin
          if (cfg_addr == REG_EV0 + 8'(4 * k))     ev[k].addr <= cfg_wdata;
          if (cfg_addr == REG_EV0 + 8'(4 * k + 1)) ev[k].mask <= cfg_wdata;
          if (cfg_addr == REG_EV0 + 8'(4 * k + 2)) ev[k].ctrl <= cfg_wdata[7:0];
        end
      end

      if (cfg_ctrl) begin
        wrap         <= cfg_wdata[2];
        init_mode    <= mode_t'(cfg_wdata[5:3]);
        comp_en      <= cfg_wdata[6];
        if (cfg_wdata[0]) begin
          state     <= cfg_wdata[1] ? S_TRACE : S_ARMED;
          mode      <= mode_t'(cfg_wdata[5:3]);
          clear     <= 1'b1;
          triggered <= 1'b0;
        end else if (trace_en) begin
          state <= S_DONE;
          stop  <= 1'b1;
        end else begin
          state <= S_IDLE;
        end
      end else begin
        unique case (state)
          S_ARMED: if (hit_start) begin
            state <= S_TRACE;
            mode  <= start_mode;
          end else if (hit_mode) mode <= new_mode;
          S_TRACE, S_POST: begin
            if (hit_mode) mode <= new_mode;
            if (end_trace) begin
              state <= S_DONE;
              stop  <= 1'b1;
            end else if (state == S_TRACE && hit_stop) begin
              triggered <= 1'b1;
              if (depth == '0) begin
                state <= S_DONE;
                stop  <= 1'b1;
              end else begin
                state    <= S_POST;
                post_cnt <= depth;
              end
            end else if (state == S_POST && sample_take) begin
              post_cnt <= post_cnt - DEPTH_W'(1);
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
