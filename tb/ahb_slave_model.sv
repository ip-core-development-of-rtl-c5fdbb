// ahb_slave_model: behavioural AHB 2.0 slave and arbiter for the testbenches.
// A 1024-word memory (address bits [11:2]) answers after a random number of
// wait states (0..MAX_WAIT, none with probability 100-WAIT_PCT %). A transfer
// to ERR_ADDR gets the two-cycle ERROR response. HGRANT follows HBUSREQ but is
// withheld at random in DENY_PCT % of the cycles, so grants come late and
// bursts lose the bus now and then. Counts wait-state cycles and errors.
module ahb_slave_model #(
  parameter int          WAIT_PCT = 30,
  parameter int          MAX_WAIT = 3,
  parameter int          DENY_PCT = 20,
  parameter logic [31:0] ERR_ADDR = 32'hDEAD_0000
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HBUSREQ,
  input  logic [1:0]  HTRANS,
  input  logic [31:0] HADDR,
  input  logic        HWRITE,
  input  logic [31:0] HWDATA,
  output logic        HGRANT,
  output logic        HREADY,
  output logic [1:0]  HRESP,
  output logic [31:0] HRDATA,
  output int          wait_cycles,
  output int          errors
);
  logic [31:0] mem [1024];
  logic        dp_active, dp_write;
  logic [31:0] dp_addr;
  int          wait_cnt;
  int          err_stage;

  initial for (int i = 0; i < 1024; i++) mem[i] = 32'hA5A5_0000 + i;

  always_comb begin
    HREADY = !dp_active || (err_stage == 0 ? wait_cnt == 0 : err_stage == 2);
    HRESP  = (dp_active && err_stage != 0) ? 2'b01 : 2'b00;
    HRDATA = (dp_active && !dp_write) ? mem[dp_addr[11:2]] : 32'h0;
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_active   <= 1'b0;
      dp_write    <= 1'b0;
      dp_addr     <= '0;
      wait_cnt    <= 0;
      err_stage   <= 0;
      HGRANT      <= 1'b0;
      wait_cycles <= 0;
      errors      <= 0;
    end else begin
      HGRANT <= (($urandom % 100) >= DENY_PCT) ? HBUSREQ : 1'b0;
      if (!HREADY) begin
        wait_cycles <= wait_cycles + 1;
        if (err_stage == 1) err_stage <= 2;
        else if (wait_cnt > 0) wait_cnt <= wait_cnt - 1;
      end else begin
        if (dp_active && dp_write && err_stage == 0) mem[dp_addr[11:2]] <= HWDATA;
        dp_active <= HTRANS[1];
        dp_addr   <= HADDR;
        dp_write  <= HWRITE;
        err_stage <= 0;
        wait_cnt  <= 0;
        if (HTRANS[1]) begin
          if (HADDR == ERR_ADDR) begin
            err_stage <= 1;
            errors    <= errors + 1;
          end else if (($urandom % 100) < WAIT_PCT) begin
            wait_cnt <= 1 + ($urandom % MAX_WAIT);
          end
        end
      end
    end
  end
endmodule
