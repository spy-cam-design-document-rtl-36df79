// ip_tcp_tx: builds the acknowledgement / synchronisation packet the FPGA
// sends to the camera.
//
// The packet is an Ethernet II frame carrying a 41-byte IPv4 datagram:
// 20-byte IP header, 20-byte TCP header and one positioning byte. The IP
// header uses version 4, IHL 5, TOS 0, total length 41, flags 010 (don't
// fragment), fragment offset 0, protocol 6; the TCP header uses data offset 5,
// reserved 0 and the flags, sequence and acknowledgement numbers given at
// `load`. Both checksums are computed here: the IP header checksum over the
// 20 header bytes, the TCP checksum over the pseudo-header (source and
// destination address, protocol, TCP length) and the 21-byte segment.
// The frame is padded with zeros to the 60-byte Ethernet minimum.
//
// Interface: `load` (one cycle) latches flags/seq/ack/pos and the link
// configuration and advances the IP identification counter. The frame is
// then read 16 bits at a time through `widx` -> `wdata` (combinational),
// first byte of each pair in bits [7:0], matching the NIC's word-wide data
// port. The field layout and fixed values follow the design's header tables;
// the Ethernet framing, the zero padding, the TTL and window values, and
// incrementing the identification by one per packet are this design's choices.
module ip_tcp_tx
  import spycam_pkg::*;
#(
  parameter int unsigned FRAME_BYTES = 60,   // padded Ethernet frame length
  parameter logic [7:0]  TTL         = IP_TTL_DEF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  link_cfg_t   cfg,
  input  logic [5:0]  flags,
  input  logic [31:0] seq,
  input  logic [31:0] ack,
  input  logic [7:0]  pos,
  input  logic [4:0]  widx,
  output logic [15:0] wdata,
  output logic [15:0] ip_csum,    // header checksum field as sent
  output logic [15:0] tcp_csum    // TCP checksum field as sent
);
  localparam int unsigned IP_LEN  = IP_HDR_BYTES + TCP_HDR_BYTES + POS_BYTES;  // 41
  localparam int unsigned TCP_LEN = TCP_HDR_BYTES + POS_BYTES;                 // 21
  localparam int unsigned IP_OFF  = ETH_HDR_BYTES;                             // 14
  localparam int unsigned TCP_OFF = ETH_HDR_BYTES + IP_HDR_BYTES;              // 34

  link_cfg_t   cfg_q;
  logic [5:0]  flags_q;
  logic [31:0] seq_q, ack_q;
  logic [7:0]  pos_q;
  logic [15:0] ident_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg_q   <= '0;
      flags_q <= '0;
      seq_q   <= '0;
      ack_q   <= '0;
      pos_q   <= '0;
      ident_q <= '0;
    end else if (load) begin
      cfg_q   <= cfg;
      flags_q <= flags;
      seq_q   <= seq;
      ack_q   <= ack;
      pos_q   <= pos;
      ident_q <= ident_q + 16'd1;
    end
  end

  logic [7:0]  fb [FRAME_BYTES];     // frame bytes, checksum fields filled in
  logic [7:0]  hb [FRAME_BYTES];     // frame bytes with checksum fields zero
  logic [15:0] ip_sum, tcp_sum;

  always_comb begin
    for (int i = 0; i < FRAME_BYTES; i++) hb[i] = 8'h00;
    // Ethernet header
    for (int i = 0; i < 6; i++) begin
      hb[i]     = cfg_q.cam_mac[47-8*i -: 8];
      hb[6 + i] = cfg_q.local_mac[47-8*i -: 8];
    end
    hb[12] = ETHERTYPE_IP[15:8];
    hb[13] = ETHERTYPE_IP[7:0];
    // IP header
    hb[IP_OFF+0]  = {IP_VERSION, IP_IHL};
    hb[IP_OFF+1]  = IP_TOS;
    hb[IP_OFF+2]  = 8'(IP_LEN >> 8);
    hb[IP_OFF+3]  = 8'(IP_LEN);
    hb[IP_OFF+4]  = ident_q[15:8];
    hb[IP_OFF+5]  = ident_q[7:0];
    hb[IP_OFF+6]  = {IP_FLAGS, IP_FRAG_OFF[12:8]};
    hb[IP_OFF+7]  = IP_FRAG_OFF[7:0];
    hb[IP_OFF+8]  = (cfg_q.ttl != 8'd0) ? cfg_q.ttl : TTL;
    hb[IP_OFF+9]  = IP_PROTO_TCP;
    for (int i = 0; i < 4; i++) begin
      hb[IP_OFF+12+i] = cfg_q.local_ip[31-8*i -: 8];
      hb[IP_OFF+16+i] = cfg_q.cam_ip[31-8*i -: 8];
    end
    // TCP header
    hb[TCP_OFF+0]  = cfg_q.local_port[15:8];
    hb[TCP_OFF+1]  = cfg_q.local_port[7:0];
    hb[TCP_OFF+2]  = cfg_q.cam_port[15:8];
    hb[TCP_OFF+3]  = cfg_q.cam_port[7:0];
    for (int i = 0; i < 4; i++) begin
      hb[TCP_OFF+4+i] = seq_q[31-8*i -: 8];
      hb[TCP_OFF+8+i] = ack_q[31-8*i -: 8];
    end
    hb[TCP_OFF+12] = {TCP_OFFSET, 4'b0000};
    hb[TCP_OFF+13] = {2'b00, flags_q};
    hb[TCP_OFF+14] = TCP_WINDOW[15:8];
    hb[TCP_OFF+15] = TCP_WINDOW[7:0];
    hb[TCP_OFF+TCP_HDR_BYTES] = pos_q;

    // IP header checksum: ones'-complement sum of the ten header words
    ip_sum = 16'h0000;
    for (int w = 0; w < IP_HDR_BYTES / 2; w++)
      ip_sum = csum_add(ip_sum, {hb[IP_OFF+2*w], hb[IP_OFF+2*w+1]});

    // TCP checksum: pseudo-header, then the segment padded to whole words
    tcp_sum = 16'h0000;
    tcp_sum = csum_add(tcp_sum, cfg_q.local_ip[31:16]);
    tcp_sum = csum_add(tcp_sum, cfg_q.local_ip[15:0]);
    tcp_sum = csum_add(tcp_sum, cfg_q.cam_ip[31:16]);
    tcp_sum = csum_add(tcp_sum, cfg_q.cam_ip[15:0]);
    tcp_sum = csum_add(tcp_sum, {8'h00, IP_PROTO_TCP});
    tcp_sum = csum_add(tcp_sum, 16'(TCP_LEN));
    for (int w = 0; w < (TCP_LEN + 1) / 2; w++)
      tcp_sum = csum_add(tcp_sum, {hb[TCP_OFF+2*w],
                                   (2*w + 1 < TCP_LEN) ? hb[TCP_OFF+2*w+1] : 8'h00});

    ip_csum  = ~ip_sum;
    tcp_csum = ~tcp_sum;

    for (int i = 0; i < FRAME_BYTES; i++) fb[i] = hb[i];
    fb[IP_OFF+10]  = ip_csum[15:8];
    fb[IP_OFF+11]  = ip_csum[7:0];
    fb[TCP_OFF+16] = tcp_csum[15:8];
    fb[TCP_OFF+17] = tcp_csum[7:0];
  end

  always_comb begin
    wdata = 16'h0000;
    if (2 * int'(widx) + 1 < FRAME_BYTES)
      wdata = {fb[2*widx+1], fb[2*widx]};
  end

endmodule
