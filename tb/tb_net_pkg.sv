// tb_net_pkg: packet helpers for the testbenches.
//
// Builds Ethernet/IPv4/TCP frames byte by byte and checks checksums, written
// directly from the IPv4 and TCP header layouts, independently of the RTL.
package tb_net_pkg;

  typedef byte unsigned bytes_t[$];

  // 16-bit ones'-complement sum of len bytes from start, plus init
  function automatic logic [15:0] ocsum(bytes_t b, int start, int len, logic [31:0] init);
    logic [31:0] s;
    s = init;
    for (int i = 0; i < len; i += 2) begin
      s += {16'd0, b[start+i], (i + 1 < len) ? b[start+i+1] : 8'h00};
      s = (s & 32'hFFFF) + (s >> 16);
    end
    s = (s & 32'hFFFF) + (s >> 16);
    return s[15:0];
  endfunction

  function automatic void put16(ref bytes_t b, input int at, input logic [15:0] v);
    b[at]   = v[15:8];
    b[at+1] = v[7:0];
  endfunction

  function automatic void put32(ref bytes_t b, input int at, input logic [31:0] v);
    for (int i = 0; i < 4; i++) b[at+i] = v[31-8*i -: 8];
  endfunction

  function automatic logic [31:0] get32(bytes_t b, int at);
    return {b[at], b[at+1], b[at+2], b[at+3]};
  endfunction

  function automatic logic [15:0] get16(bytes_t b, int at);
    return {b[at], b[at+1]};
  endfunction

  // Ethernet II + IPv4 (20 bytes) + TCP (20 bytes) + payload, padded to 60
  function automatic bytes_t make_frame(
      logic [47:0] dmac, logic [47:0] smac, logic [31:0] sip, logic [31:0] dip,
      logic [15:0] sport, logic [15:0] dport, logic [31:0] seq, logic [31:0] ack,
      logic [5:0] flags, bytes_t payload, logic [15:0] ident,
      logic [7:0] ttl = 8'd64, logic [15:0] win = 16'd4096);
    bytes_t f;
    int tl, n;
    logic [15:0] s;
    tl = 40 + payload.size();
    n  = 14 + tl;
    for (int i = 0; i < n; i++) f.push_back(8'h00);
    for (int i = 0; i < 6; i++) begin
      f[i]   = dmac[47-8*i -: 8];
      f[6+i] = smac[47-8*i -: 8];
    end
    put16(f, 12, 16'h0800);
    f[14] = 8'h45;
    put16(f, 16, 16'(tl));
    put16(f, 18, ident);
    put16(f, 20, 16'h4000);
    f[22] = ttl;
    f[23] = 8'd6;
    put32(f, 26, sip);
    put32(f, 30, dip);
    put16(f, 24, ~ocsum(f, 14, 20, 0));
    put16(f, 34, sport);
    put16(f, 36, dport);
    put32(f, 38, seq);
    put32(f, 42, ack);
    f[46] = 8'h50;
    f[47] = {2'b00, flags};
    put16(f, 48, win);
    for (int i = 0; i < payload.size(); i++) f[54+i] = payload[i];
    s = ocsum(f, 34, tl - 20, {16'd0, sip[31:16]} + {16'd0, sip[15:0]} +
              {16'd0, dip[31:16]} + {16'd0, dip[15:0]} + 32'd6 + 32'(tl - 20));
    put16(f, 50, ~s);
    while (f.size() < 60) f.push_back(8'h00);
    return f;
  endfunction

  function automatic bit ip_csum_ok(bytes_t f);
    return ocsum(f, 14, 20, 0) == 16'hFFFF;
  endfunction

  function automatic bit tcp_csum_ok(bytes_t f);
    int tl;
    logic [31:0] sip, dip;
    tl  = int'(get16(f, 16));
    sip = get32(f, 26);
    dip = get32(f, 30);
    return ocsum(f, 34, tl - 20, {16'd0, sip[31:16]} + {16'd0, sip[15:0]} +
                 {16'd0, dip[31:16]} + {16'd0, dip[15:0]} + 32'd6 + 32'(tl - 20)) == 16'hFFFF;
  endfunction

  // pixel value the test camera sends for byte i of segment pos
  function automatic byte unsigned pixel(int frame, int pos, int i);
    return 8'((pos * 37 + i * 5 + frame * 11 + (i >> 4)) & 8'hFF);
  endfunction

endpackage
