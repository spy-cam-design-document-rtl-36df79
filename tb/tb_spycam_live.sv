// tb_spycam_live: end-to-end test of the spy-cam design in live mode
// (LIVE = 1), where pixels go into the screen buffer as they arrive instead
// of being copied from SRAM after the frame is complete. Default frame size.
//
// The camera side answers the SYN and sends one whole frame over a screen
// buffer that holds an older picture. After each acknowledged segment the
// screen buffer must already hold that segment's pixels while the next
// segment's place still shows the old picture; the SRAM must hold the same
// pixels. A segment with a corrupted pixel is shown until its resent copy
// overwrites it. At the end the whole screen buffer must hold the frame,
// `frames_copied` must count it, and the video converter must never have
// touched the bus.
module tb_spycam_live;
  import spycam_pkg::*;
  import tb_net_pkg::*;

  logic clk = 0, pix_clk = 0, rst = 1, connect = 0;
  link_cfg_t cfg;
  logic [31:0] iss = 32'h0000_1000;
  logic [19:0] pb_a;
  logic [15:0] pb_d_o, pb_d_i, sram_d, eth_d;
  logic pb_d_oe, pb_lb_n, pb_ub_n, pb_we_n, pb_oe_n, ram_ce_n, eth_cs_n, eth_rdy, eth_ireq;
  logic vga_hsync_n, vga_vsync_n, vga_active, vga_frame_start, nic_ready, frame_done;
  logic [7:0] vga_red, vga_green, vga_blue;
  logic [1:0] tcp_state;
  logic [15:0] rx_count, tx_count, frames_copied, dup_acks, txp_waits, ring_wraps;
  int checks = 0, failures = 0;

  spycam_top #(.LIVE(1'b1)) dut (.*);

  sram_model u_sram (.clk, .ce_n(ram_ce_n), .oe_n(pb_oe_n), .we_n(pb_we_n), .lb_n(pb_lb_n),
    .ub_n(pb_ub_n), .a(pb_a[17:0]), .d_i(pb_d_o), .d_o(sram_d));
  ax88796_model u_ax (.clk, .cs_n(eth_cs_n), .oe_n(pb_oe_n), .we_n(pb_we_n), .a(pb_a[4:0]),
    .d_i(pb_d_o), .d_o(eth_d), .rdy(eth_rdy), .ireq(eth_ireq));
  assign pb_d_i = !ram_ce_n ? sram_d : eth_d;

  always #9  clk = ~clk;
  always #18 pix_clk = ~pix_clk;

  int n_conv_bus = 0;
  always @(posedge clk) if (dut.breq[1].req) n_conv_bus++;

  initial begin
    #200ms;
    failures++;
    $display("watchdog: rx %0d tx %0d state %0d", rx_count, tx_count, tcp_state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic expect_ack(string what, logic [5:0] fl, logic [31:0] sq, logic [31:0] ak);
    bytes_t f;
    for (int i = 0; i < 200000 && u_ax.tx_q.size() == 0; i++) @(negedge clk);
    checks++;
    if (u_ax.tx_q.size() == 0) begin failures++; $display("FAIL %s: no packet", what); return; end
    f = u_ax.tx_q.pop_front();
    if (f.size() != 60 || !ip_csum_ok(f) || !tcp_csum_ok(f) || f[47][5:0] != fl ||
        get32(f, 38) != sq || (fl[TCP_ACK] && get32(f, 42) != ak)) begin
      failures++;
      $display("FAIL %s: flags %b seq %h/%h ack %h/%h", what, f[47][5:0], get32(f, 38), sq,
               get32(f, 42), ak);
    end
  endtask

  function automatic bytes_t seg_frame(logic [31:0] sq, logic [31:0] ak, logic [5:0] fl,
                                       bytes_t p);
    return make_frame(cfg.local_mac, cfg.cam_mac, cfg.cam_ip, cfg.local_ip, cfg.cam_port,
                      cfg.local_port, sq, ak, fl, p, 16'($urandom));
  endfunction

  function automatic bytes_t video(int pos);
    bytes_t p;
    p.push_back(8'(pos));
    for (int i = 0; i < 512; i++) p.push_back(pixel(3, pos, i));
    return p;
  endfunction

  // old picture in the screen buffer before the frame arrives
  function automatic logic [7:0] old_pixel(int a);
    return 8'(a * 7 + 3) ^ 8'h5A;
  endfunction

  // count of screen buffer bytes in [lo, hi) that differ from frame 3
  function automatic int wrong_new(int lo, int hi);
    int bad = 0;
    for (int a = lo; a < hi && a < 19200; a++) if (dut.u_sb.mem[a] != pixel(3, a / 512, a % 512)) bad++;
    return bad;
  endfunction

  function automatic int wrong_old(int lo, int hi);
    int bad = 0;
    for (int a = lo; a < hi && a < 19200; a++) if (dut.u_sb.mem[a] != old_pixel(a)) bad++;
    return bad;
  endfunction

  function automatic int wrong_sram(int lo, int hi);
    int bad = 0;
    for (int a = lo; a < hi && a < 19200; a++) begin
      logic [15:0] w;
      w = u_sram.mem[a / 2];
      if ((a % 2 ? w[15:8] : w[7:0]) != pixel(3, a / 512, a % 512)) bad++;
    end
    return bad;
  endfunction

  initial begin
    logic [31:0] cam, mine;
    bytes_t p, f;
    int seg_ok = 0, bad_shown = 0;
    cfg.local_mac = 48'h02_00_00_00_00_01; cfg.cam_mac = 48'h00_40_8C_AA_BB_CC;
    cfg.local_ip = 32'hC0A8_0105; cfg.cam_ip = 32'hC0A8_0102;
    cfg.local_port = 16'd50000; cfg.cam_port = 16'd8080; cfg.ttl = 8'd32;
    for (int a = 0; a < 19200; a++) dut.u_sb.mem[a] = old_pixel(a);
    repeat (4) @(negedge clk);
    rst = 0;
    wait (nic_ready);
    @(negedge clk) connect = 1;
    @(negedge clk) connect = 0;

    expect_ack("SYN", 6'b000010, iss, 0);
    mine = iss + 2;
    cam  = 32'hFFFF_FF00;            // sequence numbers wrap during the frame
    p.delete();
    u_ax.inject(seg_frame(cam, mine, 6'b010010, p));
    cam = cam + 1;
    expect_ack("ACK of SYN", 6'b010000, mine, cam);
    mine = mine + 1;
    chk("established", tcp_state == 2'd2);

    for (int pos = 0; pos < 38; pos++) begin
      if (pos == 10) begin
        // corrupted copy first: shown, not acknowledged
        f = seg_frame(cam, mine, 6'b011000, video(pos));
        f[14 + 41 + 100] ^= 8'h3C;
        u_ax.inject(f);
        repeat (30000) @(negedge clk);
        chk("corrupted segment not acknowledged", u_ax.tx_q.size() == 0);
        if (dut.u_sb.mem[pos * 512 + 100] == (pixel(3, pos, 100) ^ 8'h3C)) bad_shown++;
      end
      u_ax.inject(seg_frame(cam, mine, 6'b011000, video(pos)));
      expect_ack("ACK of video", 6'b010000, mine, cam + 513);
      repeat (4) @(negedge clk);
      if (wrong_new(pos * 512, pos * 512 + 512) == 0 &&
          wrong_old(pos * 512 + 512, pos * 512 + 1024) == 0 &&
          wrong_sram(pos * 512, pos * 512 + 512) == 0) seg_ok++;
      else $display("FAIL segment %0d not shown as it arrived", pos);
      mine = mine + 1;
      cam  = cam + 513;
    end
    chk("each segment shown as soon as it arrived, next place still old", seg_ok == 38);
    chk("corrupted pixel shown until resent", bad_shown == 1);
    chk("whole frame in the screen buffer", wrong_new(0, 19200) == 0);
    chk("frame counted", frames_copied == 16'd1);
    chk("video converter idle in live mode", n_conv_bus == 0);

    p.delete();
    u_ax.inject(seg_frame(cam, mine, 6'b010001, p));
    expect_ack("FIN+ACK", 6'b010001, mine, cam + 1);
    repeat (10) @(negedge clk);
    chk("closed", tcp_state == 2'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
