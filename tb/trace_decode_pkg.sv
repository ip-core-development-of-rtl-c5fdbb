// trace_decode_pkg: reference decoder for the tracer's packet stream, used by
// the testbenches. It is written from the packet format (see tracer_pkg), not
// from the RTL: it reads a list of trace memory words as one bit stream, first
// bit = bit 0 of the first word, and returns the packets it finds. Words of
// up to 128 bits are held in bit [127:0] queues. A PAD
// header (type 00) means the rest of that word is empty.
package trace_decode_pkg;

  typedef struct {
    bit        is_mode;
    bit        loss;
    bit [2:0]  mode;       // mode packets: {txn, level}
    bit        comp;       // mode packets: compression enabled
    bit        txn;        // sample packets
    bit        has_addr, hit, has_data, has_ctrl;
    bit [31:0] addr;       // index on a hit
    bit [31:0] data;
    bit [18:0] ctrl;
  } dec_t;

  function automatic bit [31:0] take(const ref bit s[$], ref int pos, input int n);
    bit [31:0] v = 0;
    for (int i = 0; i < n; i++) begin
      v[i] = (pos < s.size()) ? s[pos] : 1'b0;
      pos++;
    end
    return v;
  endfunction

  // Decode the stream s (W-bit words); returns the packets and sets 'bad'
  // when a packet runs past the end of the stream.
  function automatic void decode(const ref bit s[$], input int W,
                                 ref dec_t out[$], output bit bad);
    int pos = 0;
    bad = 0;
    while (pos + 2 <= s.size()) begin
      bit [7:0] h;
      dec_t d;
      int p0 = pos;
      h = 8'(take(s, pos, 8));
      d = '{default: 0};
      d.loss = h[6];
      if (h[1:0] == 2'b00) begin
        pos = ((p0 / W) + 1) * W;   // rest of the word is padding
        continue;
      end
      if (h[1:0] == 2'b10) begin
        d.is_mode = 1;
        d.mode    = h[4:2];
        d.comp    = h[5];
      end else if (h[1:0] == 2'b01) begin
        d.has_addr = h[2];
        d.hit      = h[3];
        d.has_data = h[4];
        d.has_ctrl = h[5];
        d.txn      = h[7];
        if (d.has_addr) d.addr = take(s, pos, d.hit ? 4 : 32);
        if (d.has_data) d.data = take(s, pos, 32);
        if (d.has_ctrl) d.ctrl = 19'(take(s, pos, 19));
      end else begin
        bad = 1;
        return;
      end
      if (pos > s.size()) begin
        bad = 1;
        return;
      end
      out.push_back(d);
    end
  endfunction

  function automatic void words_to_bits(const ref bit [127:0] w[$], input int W, ref bit s[$]);
    foreach (w[i]) for (int b = 0; b < W; b++) s.push_back(w[i][b]);
  endfunction

endpackage
