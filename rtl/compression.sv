// compression: Compression Module of the AHB bus tracer.
//
// Dictionary compression of the traced address. Code tends to revisit the
// same addresses (loops), so a small dictionary of frequent addresses is kept
// and, on a hit, the 4-bit index of the entry is traced instead of the 32-bit
// address. The dictionary is a read-only table fixed when the design is built
// (parameter DICT); on a miss, or with compression disabled, the full address
// passes through. Data and control fields pass unchanged.
//
// The module is a two-stage pipeline so that the 16 parallel comparisons and
// the index encoding each get a clock cycle:
//   stage 1 - register the record with a 16-bit hit vector (address == entry)
//   stage 2 - encode the lowest hit into the index, register the result
// Latency: two cycles from rec_in to rec_out, one record per cycle. The flush
// flag travels with the records.
//
// Dictionary compression, its purpose and the read-only table come from the
// document; the table size, its default contents (sixteen consecutive word
// addresses from 0x0000_0000) and the two-stage split are this design's own.
module compression
  import tracer_pkg::*;
#(
  parameter logic [DICT_N-1:0][AW-1:0] DICT = default_dict()
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     comp_en,
  input  abs_rec_t rec_in,
  output cmp_rec_t rec_out
);

  function automatic logic [DICT_N-1:0][AW-1:0] default_dict();
    for (int i = 0; i < DICT_N; i++) default_dict[i] = AW'(4 * i);
  endfunction

  // ---- stage 1: compare ---------------------------------------------------
  abs_rec_t          s1_rec;
  logic              s1_en;
  logic [DICT_N-1:0] s1_hit;
  logic [DICT_N-1:0] hit;

  always_comb
    for (int i = 0; i < DICT_N; i++) hit[i] = (rec_in.addr == DICT[i]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_rec <= '0;
      s1_en  <= 1'b0;
      s1_hit <= '0;
    end else begin
      s1_rec <= rec_in;
      s1_en  <= comp_en;
      s1_hit <= hit;
    end
  end

  // ---- stage 2: encode ----------------------------------------------------
  logic [DICT_IW-1:0] idx;
  always_comb begin
    idx = '0;
    for (int i = DICT_N - 1; i >= 0; i--) if (s1_hit[i]) idx = DICT_IW'(i);
  end

  cmp_rec_t nxt;
  always_comb begin
    nxt          = '0;
    nxt.valid    = s1_rec.valid;
    nxt.flush    = s1_rec.flush;
    nxt.mode     = s1_rec.mode;
    nxt.comp_en  = s1_en;
    nxt.has_addr = s1_rec.has_addr;
    nxt.has_data = s1_rec.has_data;
    nxt.has_ctrl = s1_rec.has_ctrl;
    nxt.addr_hit = s1_en && s1_rec.has_addr && (s1_hit != '0);
    nxt.addr     = nxt.addr_hit ? AW'(idx) : s1_rec.addr;
    nxt.data     = s1_rec.data;
    nxt.ctrl     = s1_rec.ctrl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rec_out <= '0;
    else        rec_out <= nxt;
  end

endmodule
