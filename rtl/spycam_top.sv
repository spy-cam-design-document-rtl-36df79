// spycam_top: FPGA side of the network spy camera.
//
// An IP camera streams raw 8-bit pixels over TCP. Each TCP segment carries a
// positioning byte (its index within the frame) and 512 pixel bytes. The
// FPGA opens the connection, reads every received packet out of the AX88796
// Ethernet controller, stores the pixels in the board SRAM at the place the
// positioning byte gives, acknowledges the segment, and, once the last
// segment of a frame is in, lets the video converter copy the frame from SRAM
// into the screen buffer that the VGA output displays.
//
//   camera -> AX88796 -> nic_ctrl -> ip_tcp_rx -> SRAM (via pb_bus_ctrl)
//                          ^   |          |
//                  ip_tcp_tx   +-- tcp_conn (SYN / ACK / FIN)
//   SRAM -> video_conv -> screen_buf -> vga_out -> VGA connector
//
// Clocks: `clk` is the system clock (18 ns period in the design's clock
// plan) for everything but the VGA side, which runs on `pix_clk` (36 ns);
// the screen buffer is the only crossing. `rst` is synchronous, active high,
// and is re-synchronised into the pixel domain.
//
// Ports: the link configuration (MAC and IP addresses, TCP ports, TTL) and
// the initial sequence number come in as signals, as a processor or
// switches would set them; `connect` opens the connection. The shared board
// bus is brought out pin for pin with the data bus split into in/out/enable.
// The frame size defaults to the design's working resolution, 160 x 120.
//
// Two ways to fill the screen buffer, chosen by LIVE:
//   LIVE = 0 (default): the chain camera -> controller -> SRAM -> video
//     converter -> VGA. The frame is copied from SRAM once its last segment
//     is in, so only whole frames are shown. `frames_copied` counts copies.
//   LIVE = 1: pixels are written to SRAM and, at the same time, straight into
//     the screen buffer as they arrive, so the picture updates segment by
//     segment. The video converter is then idle; `frames_copied` counts
//     completed frames. Pixels of a segment that later fails its TCP
//     checksum are shown until the resent segment overwrites them.
// Both ways appear in the design's description (the block chain, and pixels
// moved to SRAM and screen buffer simultaneously); making the block chain the
// default is this design's choice.
module spycam_top
  import spycam_pkg::*;
#(
  parameter int unsigned FRAME_W     = 160,
  parameter int unsigned FRAME_H     = 120,
  parameter int unsigned SCALE       = 4,
  parameter int unsigned POLL_CYCLES = 4096,
  parameter bit          LIVE        = 1'b0,
  parameter int unsigned FRAME_BYTES = FRAME_W * FRAME_H,
  parameter int unsigned AW          = $clog2(FRAME_BYTES)
) (
  input  logic        clk,
  input  logic        pix_clk,
  input  logic        rst,
  input  link_cfg_t   cfg,
  input  logic [31:0] iss,
  input  logic        connect,
  // shared board bus: SRAM and Ethernet controller
  output logic [19:0] pb_a,
  output logic [15:0] pb_d_o,
  output logic        pb_d_oe,
  input  logic [15:0] pb_d_i,
  output logic        pb_lb_n,
  output logic        pb_ub_n,
  output logic        pb_we_n,
  output logic        pb_oe_n,
  output logic        ram_ce_n,
  output logic        eth_cs_n,
  input  logic        eth_rdy,
  input  logic        eth_ireq,
  // VGA
  output logic        vga_hsync_n,
  output logic        vga_vsync_n,
  output logic        vga_active,
  output logic [7:0]  vga_red,
  output logic [7:0]  vga_green,
  output logic [7:0]  vga_blue,
  output logic        vga_frame_start,
  // status
  output logic        nic_ready,
  output logic [1:0]  tcp_state,
  output logic [15:0] rx_count,
  output logic [15:0] tx_count,
  output logic [15:0] frames_copied,
  output logic        frame_done,
  output logic [15:0] dup_acks,
  output logic [15:0] txp_waits,
  output logic [15:0] ring_wraps
);
  localparam int unsigned LAST_POS = (FRAME_BYTES - 1) / DATA_BYTES;

  bus_req_t breq [2];
  bus_rsp_t brsp [2];

  // ---- parser <-> driver
  logic        rx_sop, rx_valid, rx_eop;
  logic [7:0]  rx_byte;
  logic        pay_valid;
  logic [7:0]  pay_pos, pay_byte;
  logic [15:0] pay_off;
  logic        seg_valid;
  rx_seg_t     seg;

  // ---- transmit
  logic        tx_req, tx_load, tx_done;
  logic [5:0]  tx_flags;
  logic [31:0] tx_seq, tx_ack;
  logic [4:0]  tx_widx;
  logic [15:0] tx_wdata;
  logic [15:0] tx_ip_csum, tx_tcp_csum;

  logic        accept;
  logic [7:0]  accept_pos;

  // ---- screen buffer
  logic          sb_we, conv_we;
  logic [AW-1:0] sb_waddr, sb_raddr, conv_addr;
  logic [7:0]    sb_wdata, sb_rdata, conv_data;
  logic          conv_busy;
  logic [15:0]   conv_frames, live_frames;

  pb_bus_ctrl #(.NM(2)) u_bus (
    .clk, .rst, .req(breq), .rsp(brsp),
    .pb_a, .pb_d_o, .pb_d_oe, .pb_d_i, .pb_lb_n, .pb_ub_n, .pb_we_n, .pb_oe_n,
    .ram_ce_n, .eth_cs_n, .eth_rdy
  );

  nic_ctrl #(.FRAME_BYTES(FRAME_BYTES), .POLL_CYCLES(POLL_CYCLES)) u_nic (
    .clk, .rst, .cfg, .eth_ireq,
    .breq(breq[0]), .brsp(brsp[0]),
    .rx_sop, .rx_valid, .rx_byte, .rx_eop,
    .pay_valid, .pay_pos, .pay_off, .pay_byte,
    .tx_req, .tx_load, .tx_widx, .tx_wdata, .tx_done,
    .ready(nic_ready), .rx_count, .tx_count, .txp_waits, .ring_wraps
  );

  ip_tcp_rx u_rx (
    .clk, .rst, .cfg, .sop(rx_sop), .in_valid(rx_valid), .in_byte(rx_byte), .eop(rx_eop),
    .pay_valid, .pay_pos, .pay_off, .pay_byte, .seg_valid, .seg
  );

  tcp_conn u_tcp (
    .clk, .rst, .connect, .iss, .seg_valid, .seg,
    .tx_req, .tx_flags, .tx_seq, .tx_ack, .tx_done,
    .accept, .accept_pos, .state(tcp_state), .dup_acks
  );

  ip_tcp_tx u_tx (
    .clk, .rst, .load(tx_load), .cfg, .flags(tx_flags), .seq(tx_seq), .ack(tx_ack),
    .pos(8'h00), .widx(tx_widx), .wdata(tx_wdata),
    .ip_csum(tx_ip_csum), .tcp_csum(tx_tcp_csum)
  );

  // the last segment of a frame is in: show the frame
  assign frame_done = accept && (int'(accept_pos) == LAST_POS);

  video_conv #(.FRAME_BYTES(FRAME_BYTES)) u_conv (
    .clk, .rst, .start(frame_done && !LIVE), .breq(breq[1]), .brsp(brsp[1]),
    .sb_we(conv_we), .sb_addr(conv_addr), .sb_data(conv_data), .busy(conv_busy),
    .frames(conv_frames)
  );

  // live mode: every pixel byte the parser passes on is also written into the
  // screen buffer one clock later, at the same place it takes in SRAM
  logic [31:0]   live_byte;
  logic          live_we;
  logic [AW-1:0] live_addr;
  logic [7:0]    live_data;
  assign live_byte = 32'(pay_pos) * DATA_BYTES + 32'(pay_off);

  always_ff @(posedge clk) begin
    if (rst) begin
      live_we     <= 1'b0;
      live_addr   <= '0;
      live_data   <= '0;
      live_frames <= '0;
    end else begin
      live_we   <= LIVE && pay_valid && (live_byte < 32'(FRAME_BYTES));
      live_addr <= AW'(live_byte);
      live_data <= pay_byte;
      if (LIVE && frame_done) live_frames <= live_frames + 16'd1;
    end
  end

  assign sb_we         = LIVE ? live_we : conv_we;
  assign sb_waddr      = LIVE ? live_addr : conv_addr;
  assign sb_wdata      = LIVE ? live_data : conv_data;
  assign frames_copied = LIVE ? live_frames : conv_frames;

  screen_buf #(.DEPTH(FRAME_BYTES)) u_sb (
    .wclk(clk), .we(sb_we), .waddr(sb_waddr), .wdata(sb_wdata),
    .rclk(pix_clk), .raddr(sb_raddr), .rdata(sb_rdata)
  );

  logic [1:0] pix_rst_sync;
  always_ff @(posedge pix_clk) pix_rst_sync <= {pix_rst_sync[0], rst};

  vga_out #(.SRC_W(FRAME_W), .SRC_H(FRAME_H), .SCALE(SCALE)) u_vga (
    .clk(pix_clk), .rst(pix_rst_sync[1]), .sb_raddr, .sb_rdata,
    .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n), .active(vga_active),
    .red(vga_red), .green(vga_green), .blue(vga_blue), .frame_start(vga_frame_start)
  );

endmodule
