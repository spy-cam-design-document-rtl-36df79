// ip_tcp_rx: parses a received Ethernet frame carrying one TCP video segment.
//
// A video segment is an IPv4 datagram of 553 bytes: 20-byte IP header,
// 20-byte TCP header, one positioning byte naming the segment's place in the
// frame, then 512 pixel bytes. The parser takes the frame one byte per cycle
// (Ethernet header first), records the header fields it needs, accumulates
// the IP header checksum over bytes 14..33 and the TCP checksum over the
// segment plus its pseudo-header, and streams the pixel bytes out as they
// arrive.
//
// Interface: `sop` clears the parser before a frame; `in_valid`/`in_byte`
// carry the frame bytes; `eop` (after the last byte) ends the frame, and one
// cycle later `seg_valid` pulses with the segment summary `seg`. Bytes past
// the IP total length (Ethernet padding, CRC) are ignored. Pixel bytes come
// out on `pay_*` in the same cycle as the input byte, combinationally, but
// only when the IP header has already passed its checks (version 4, IHL 5,
// protocol 6, header checksum, addresses and ports of this link, data offset
// 5); `pay_off` counts pixel bytes from 0 after the positioning byte.
// `seg.ok` additionally requires a good TCP checksum and a complete datagram.
// Which fields are checked follows the design's header tables; putting the
// positioning byte first in the payload and checking the Ethernet type are
// this design's choices.
module ip_tcp_rx
  import spycam_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  link_cfg_t   cfg,
  input  logic        sop,
  input  logic        in_valid,
  input  logic [7:0]  in_byte,
  input  logic        eop,
  output logic        pay_valid,
  output logic [7:0]  pay_pos,
  output logic [15:0] pay_off,
  output logic [7:0]  pay_byte,
  output logic        seg_valid,
  output rx_seg_t     seg
);
  localparam int unsigned IP_OFF  = ETH_HDR_BYTES;                         // 14
  localparam int unsigned TCP_OFF = ETH_HDR_BYTES + IP_HDR_BYTES;          // 34
  localparam int unsigned POS_OFF = TCP_OFF + TCP_HDR_BYTES;               // 54
  localparam int unsigned DAT_OFF = POS_OFF + POS_BYTES;                   // 55

  logic [15:0] idx;            // byte index within the frame
  logic [15:0] etype;
  logic [7:0]  ver_ihl, proto, tcp_off;
  logic [15:0] tot_len;
  logic [31:0] src_ip, dst_ip, seq_q, ack_q;
  logic [15:0] src_port, dst_port;
  logic [5:0]  flags_q;
  logic [7:0]  pos_q;
  logic [15:0] ip_sum, tcp_sum;
  logic [7:0]  hi_byte;        // first byte of a 16-bit checksum word

  logic [15:0] ip_end;         // index one past the last IP byte
  logic        hdr_good;

  assign ip_end = 16'(IP_OFF) + tot_len;

  assign hdr_good = (etype == ETHERTYPE_IP) && (ver_ihl == {IP_VERSION, IP_IHL}) &&
                    (proto == IP_PROTO_TCP) && (ip_sum == 16'hFFFF) &&
                    (tot_len >= 16'(IP_HDR_BYTES + TCP_HDR_BYTES)) &&
                    (src_ip == cfg.cam_ip) && (dst_ip == cfg.local_ip) &&
                    (src_port == cfg.cam_port) && (dst_port == cfg.local_port) &&
                    (tcp_off[7:4] == TCP_OFFSET);

  assign pay_valid = in_valid && hdr_good && (idx >= 16'(DAT_OFF)) && (idx < ip_end);
  assign pay_pos   = pos_q;
  assign pay_off   = idx - 16'(DAT_OFF);
  assign pay_byte  = in_byte;

  // TCP checksum with the pseudo-header and a trailing odd byte folded in
  logic [15:0] tcp_len, tcp_final;
  always_comb begin
    tcp_len   = tot_len - 16'(IP_HDR_BYTES);
    tcp_final = tcp_sum;
    if (tcp_len[0]) tcp_final = csum_add(tcp_final, {hi_byte, 8'h00});
    tcp_final = csum_add(tcp_final, src_ip[31:16]);
    tcp_final = csum_add(tcp_final, src_ip[15:0]);
    tcp_final = csum_add(tcp_final, dst_ip[31:16]);
    tcp_final = csum_add(tcp_final, dst_ip[15:0]);
    tcp_final = csum_add(tcp_final, {8'h00, IP_PROTO_TCP});
    tcp_final = csum_add(tcp_final, tcp_len);
  end

  always_ff @(posedge clk) begin
    seg_valid <= 1'b0;
    if (rst || sop) begin
      idx      <= '0;
      etype    <= '0;
      ver_ihl  <= '0;
      proto    <= '0;
      tcp_off  <= '0;
      tot_len  <= '0;
      src_ip   <= '0;
      dst_ip   <= '0;
      seq_q    <= '0;
      ack_q    <= '0;
      src_port <= '0;
      dst_port <= '0;
      flags_q  <= '0;
      pos_q    <= '0;
      ip_sum   <= '0;
      tcp_sum  <= '0;
      hi_byte  <= '0;
      if (rst) seg <= '0;
    end else if (in_valid) begin
      idx <= idx + 16'd1;
      case (idx)
        16'd12: etype[15:8]    <= in_byte;
        16'd13: etype[7:0]     <= in_byte;
        16'd14: ver_ihl        <= in_byte;
        16'd16: tot_len[15:8]  <= in_byte;
        16'd17: tot_len[7:0]   <= in_byte;
        16'd23: proto          <= in_byte;
        16'd26: src_ip[31:24]  <= in_byte;
        16'd27: src_ip[23:16]  <= in_byte;
        16'd28: src_ip[15:8]   <= in_byte;
        16'd29: src_ip[7:0]    <= in_byte;
        16'd30: dst_ip[31:24]  <= in_byte;
        16'd31: dst_ip[23:16]  <= in_byte;
        16'd32: dst_ip[15:8]   <= in_byte;
        16'd33: dst_ip[7:0]    <= in_byte;
        16'd34: src_port[15:8] <= in_byte;
        16'd35: src_port[7:0]  <= in_byte;
        16'd36: dst_port[15:8] <= in_byte;
        16'd37: dst_port[7:0]  <= in_byte;
        16'd38: seq_q[31:24]   <= in_byte;
        16'd39: seq_q[23:16]   <= in_byte;
        16'd40: seq_q[15:8]    <= in_byte;
        16'd41: seq_q[7:0]     <= in_byte;
        16'd42: ack_q[31:24]   <= in_byte;
        16'd43: ack_q[23:16]   <= in_byte;
        16'd44: ack_q[15:8]    <= in_byte;
        16'd45: ack_q[7:0]     <= in_byte;
        16'd46: tcp_off        <= in_byte;
        16'd47: flags_q        <= in_byte[5:0];
        16'd54: pos_q          <= in_byte;
        default: ;
      endcase
      // checksums: words start at even offsets from the IP header (index 14);
      // the total length is not known before index 17, so its words always count
      if (idx >= 16'(IP_OFF) && (idx < 16'(IP_OFF + 4) || idx < ip_end)) begin
        if (idx[0] == 1'b0) begin
          hi_byte <= in_byte;
        end else if (idx >= 16'(IP_OFF) && idx < 16'(TCP_OFF)) begin
          ip_sum <= csum_add(ip_sum, {hi_byte, in_byte});
        end else if (idx >= 16'(TCP_OFF)) begin
          tcp_sum <= csum_add(tcp_sum, {hi_byte, in_byte});
        end
      end
    end else if (eop) begin
      seg_valid   <= 1'b1;
      seg.ok      <= hdr_good && (idx >= ip_end) && (tcp_final == 16'hFFFF);
      seg.flags   <= flags_q;
      seg.seq     <= seq_q;
      seg.ack     <= ack_q;
      seg.pay_len <= tot_len - 16'(IP_HDR_BYTES + TCP_HDR_BYTES);
      seg.pos     <= pos_q;
    end
  end

endmodule
