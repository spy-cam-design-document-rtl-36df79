// spycam_pkg: constants and types shared by the spy-cam FPGA design.
//
// Holds the AX88796 command-register codes, the AX88796 (NE2000-compatible)
// register offsets, the fixed IPv4/TCP header field values of the camera
// link, the TCP flag bit positions, the bus request/response structs of the
// shared peripheral bus, and the ones'-complement checksum helper used for
// the IP header and TCP segment checksums.
//
// The command codes 0x22 / 0x0A / 0x12 / 0x26 and the header field values
// (version 4, IHL 5, TOS 0, flags 010 = don't fragment, protocol 6, data
// offset 5) follow the design. The register offsets are those of the
// NE2000-compatible register map of the AX88796; the page layout of the NIC
// buffer memory and the TTL and window values are this design's choices.
package spycam_pkg;

  // ---------------------------------------------------------------- AX88796
  // Command register bits: [PS1 PS0 RD2 RD1 RD0 TXP STA STP]
  localparam logic [7:0] CR_ACTIVATE   = 8'h22;  // page 0, abort/complete DMA, start
  localparam logic [7:0] CR_RDMA_READ  = 8'h0A;  // page 0, remote DMA read, start
  localparam logic [7:0] CR_RDMA_WRITE = 8'h12;  // page 0, remote DMA write, start
  localparam logic [7:0] CR_TRANSMIT   = 8'h26;  // page 0, abort DMA, transmit, start
  localparam logic [7:0] CR_STOP       = 8'h21;  // page 0, abort DMA, stop
  localparam logic [7:0] CR_PAGE1      = 8'h62;  // page 1, abort DMA, start
  localparam logic [7:0] CR_PAGE1_STOP = 8'h61;  // page 1, abort DMA, stop
  localparam int unsigned CR_TXP_BIT   = 2;

  // Register offsets (page 0 unless noted)
  localparam logic [4:0] REG_CR     = 5'h00;
  localparam logic [4:0] REG_PSTART = 5'h01;
  localparam logic [4:0] REG_PSTOP  = 5'h02;
  localparam logic [4:0] REG_BNRY   = 5'h03;
  localparam logic [4:0] REG_TPSR   = 5'h04;
  localparam logic [4:0] REG_TBCR0  = 5'h05;
  localparam logic [4:0] REG_TBCR1  = 5'h06;
  localparam logic [4:0] REG_ISR    = 5'h07;
  localparam logic [4:0] REG_RSAR0  = 5'h08;
  localparam logic [4:0] REG_RSAR1  = 5'h09;
  localparam logic [4:0] REG_RBCR0  = 5'h0A;
  localparam logic [4:0] REG_RBCR1  = 5'h0B;
  localparam logic [4:0] REG_RCR    = 5'h0C;
  localparam logic [4:0] REG_TCR    = 5'h0D;
  localparam logic [4:0] REG_DCR    = 5'h0E;
  localparam logic [4:0] REG_IMR    = 5'h0F;
  localparam logic [4:0] REG_DATA   = 5'h10;
  localparam logic [4:0] REG_PAR0   = 5'h01;   // page 1: PAR0..PAR5 at 1..6
  localparam logic [4:0] REG_CURR   = 5'h07;   // page 1

  // NIC buffer memory layout, in 256-byte pages
  localparam logic [7:0] NIC_TX_PAGE    = 8'h40;
  localparam logic [7:0] NIC_RX_START   = 8'h46;
  localparam logic [7:0] NIC_RX_STOP    = 8'h80;

  // ---------------------------------------------------------------- IP/TCP
  localparam logic [3:0]  IP_VERSION   = 4'd4;
  localparam logic [3:0]  IP_IHL       = 4'd5;
  localparam logic [7:0]  IP_TOS       = 8'h00;
  localparam logic [2:0]  IP_FLAGS     = 3'b010;   // reserved 0, DF 1, MF 0
  localparam logic [12:0] IP_FRAG_OFF  = 13'd0;
  localparam logic [7:0]  IP_PROTO_TCP = 8'd6;
  localparam logic [7:0]  IP_TTL_DEF   = 8'd64;
  localparam logic [15:0] ETHERTYPE_IP = 16'h0800;
  localparam logic [3:0]  TCP_OFFSET   = 4'd5;
  localparam logic [15:0] TCP_WINDOW   = 16'd1024;

  localparam int unsigned ETH_HDR_BYTES = 14;
  localparam int unsigned IP_HDR_BYTES  = 20;
  localparam int unsigned TCP_HDR_BYTES = 20;
  localparam int unsigned POS_BYTES     = 1;
  localparam int unsigned DATA_BYTES    = 512;       // pixel bytes per video segment

  // TCP flags, in header order U A P R S F (bit 5 .. bit 0)
  localparam int unsigned TCP_FIN = 0;
  localparam int unsigned TCP_SYN = 1;
  localparam int unsigned TCP_RST = 2;
  localparam int unsigned TCP_PSH = 3;
  localparam int unsigned TCP_ACK = 4;
  localparam int unsigned TCP_URG = 5;

  // Addressing of the two endpoints of the link
  typedef struct packed {
    logic [47:0] local_mac;
    logic [47:0] cam_mac;
    logic [31:0] local_ip;
    logic [31:0] cam_ip;
    logic [15:0] local_port;
    logic [15:0] cam_port;
    logic [7:0]  ttl;
  } link_cfg_t;

  // Summary of one received segment
  typedef struct packed {
    logic        ok;        // well-formed, addressed to us, checksums good
    logic [5:0]  flags;
    logic [31:0] seq;
    logic [31:0] ack;
    logic [15:0] pay_len;   // TCP payload bytes (positioning byte included)
    logic [7:0]  pos;       // positioning byte
  } rx_seg_t;

  // ---------------------------------------------------------------- bus
  typedef struct packed {
    logic        req;
    logic        we;
    logic        eth;       // 1: Ethernet controller, 0: SRAM
    logic [19:0] addr;
    logic [15:0] wdata;
    logic [1:0]  be;        // byte enables, [1] upper byte, [0] lower byte
  } bus_req_t;

  typedef struct packed {
    logic        done;      // one-cycle pulse: access finished
    logic [15:0] rdata;
  } bus_rsp_t;

  // ---------------------------------------------------------------- checksum
  // 16-bit ones'-complement addition with end-around carry.
  function automatic logic [15:0] csum_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

endpackage
