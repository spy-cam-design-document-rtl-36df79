// tb_spycam_top: end-to-end test of the spy-cam design at its default sizes
// (160 x 120 frame, 640 x 480 VGA), with behavioural models of the AX88796
// and the SRAM on the shared bus, and a scripted camera on the network side.
//
// The camera answers the FPGA's SYN, then sends two whole frames, 38 video
// segments each, stop-and-wait: every segment must be acknowledged with the
// right sequence and acknowledgement numbers before the next is sent. Along
// the way it sends a segment with a corrupted pixel (must be ignored, then
// resent), a segment for another port (ignored), and a repeated segment
// (duplicate ACK). After each frame the screen buffer must hold the frame;
// after the first, one whole VGA frame is checked pixel by pixel. A FIN
// closes the connection. Each mechanism is counted and must occur. The second
// frame is timed: received, acknowledged segment by segment and copied, it
// must take less than 1/12 s of 18 ns clocks.
module tb_spycam_top;
  import spycam_pkg::*;
  import tb_net_pkg::*;

  logic clk = 0, pix_clk = 0, rst = 1, connect = 0;
  link_cfg_t cfg;
  logic [31:0] iss = 32'h7000_0000;
  logic [19:0] pb_a;
  logic [15:0] pb_d_o, pb_d_i, sram_d, eth_d;
  logic pb_d_oe, pb_lb_n, pb_ub_n, pb_we_n, pb_oe_n, ram_ce_n, eth_cs_n, eth_rdy, eth_ireq;
  logic vga_hsync_n, vga_vsync_n, vga_active, vga_frame_start, nic_ready, frame_done;
  logic [7:0] vga_red, vga_green, vga_blue;
  logic [1:0] tcp_state;
  logic [15:0] rx_count, tx_count, frames_copied, dup_acks, txp_waits, ring_wraps;
  int checks = 0, failures = 0;

  spycam_top dut (.*);

  sram_model u_sram (.clk, .ce_n(ram_ce_n), .oe_n(pb_oe_n), .we_n(pb_we_n), .lb_n(pb_lb_n),
    .ub_n(pb_ub_n), .a(pb_a[17:0]), .d_i(pb_d_o), .d_o(sram_d));
  ax88796_model u_ax (.clk, .cs_n(eth_cs_n), .oe_n(pb_oe_n), .we_n(pb_we_n), .a(pb_a[4:0]),
    .d_i(pb_d_o), .d_o(eth_d), .rdy(eth_rdy), .ireq(eth_ireq));
  assign pb_d_i = !ram_ce_n ? sram_d : eth_d;

  always #9  clk = ~clk;       // 18 ns system clock
  always #18 pix_clk = ~pix_clk;  // 36 ns pixel clock

  // mechanism counters
  int n_rdy_wait = 0, n_bad_dropped = 0, n_foreign_dropped = 0, n_dup = 0, n_frames_shown = 0;
  int n_vga_frames = 0, n_irq = 0;
  longint cyc = 0, t_seg, seg_max = 0, t_frame, frame_cycles = 0;
  always @(posedge clk) begin
    cyc++;
    if (!eth_cs_n && !eth_rdy) n_rdy_wait++;
    if (eth_ireq) n_irq++;
  end

  initial begin
    #400ms;
    failures++;
    $display("watchdog: rx %0d tx %0d state %0d", rx_count, tx_count, tcp_state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // next frame sent by the FPGA, or an empty queue after `cycles` clocks
  task automatic get_tx(output bytes_t f, input int cycles);
    f.delete();
    for (int i = 0; i < cycles && u_ax.tx_q.size() == 0; i++) @(negedge clk);
    if (u_ax.tx_q.size() != 0) f = u_ax.tx_q.pop_front();
  endtask

  task automatic expect_tx(string what, logic [5:0] fl, logic [31:0] sq, logic [31:0] ak);
    bytes_t f;
    get_tx(f, 200000);
    checks++;
    if (f.size() != 60) begin failures++; $display("FAIL %s: no packet", what); return; end
    if (!ip_csum_ok(f) || !tcp_csum_ok(f) || get16(f, 16) != 16'd41 ||
        f[47][5:0] != fl || get32(f, 38) != sq || (fl[TCP_ACK] && get32(f, 42) != ak) ||
        get32(f, 26) != cfg.local_ip || get32(f, 30) != cfg.cam_ip ||
        get16(f, 34) != cfg.local_port || get16(f, 36) != cfg.cam_port) begin
      failures++;
      $display("FAIL %s: flags %b seq %h/%h ack %h/%h", what, f[47][5:0], get32(f, 38), sq,
               get32(f, 42), ak);
    end
  endtask

  task automatic expect_nothing(string what);
    bytes_t f;
    get_tx(f, 30000);
    chk(what, f.size() == 0);
  endtask

  function automatic bytes_t seg_frame(logic [31:0] sq, logic [31:0] ak, logic [5:0] fl,
                                       bytes_t p, logic [15:0] dport);
    return make_frame(cfg.local_mac, cfg.cam_mac, cfg.cam_ip, cfg.local_ip, cfg.cam_port,
                      dport, sq, ak, fl, p, 16'($urandom));
  endfunction

  function automatic bytes_t video(int fr, int pos);
    bytes_t p;
    p.push_back(8'(pos));
    for (int i = 0; i < 512; i++) p.push_back(pixel(fr, pos, i));
    return p;
  endfunction

  function automatic byte unsigned expected_pixel(int fr, int a);
    return pixel(fr, a / 512, a % 512);
  endfunction

  task automatic check_screen(int fr);
    int bad;
    bad = 0;
    for (int a = 0; a < 19200; a++) if (dut.u_sb.mem[a] != expected_pixel(fr, a)) bad++;
    chk($sformatf("screen buffer holds frame %0d (%0d wrong)", fr, bad), bad == 0);
  endtask

  // one whole VGA frame, every pixel
  task automatic check_vga(int fr);
    int x, y, bad, act;
    logic [7:0] p;
    @(posedge pix_clk);
    while (!vga_frame_start) @(negedge pix_clk);
    x = 0; y = 0; bad = 0; act = 0;
    while (y < 525) begin
      if (vga_active) begin
        act++;
        p = expected_pixel(fr, (y / 4) * 160 + x / 4);
        if (x >= 640 || y >= 480 || vga_red != {p[7:5], p[7:5], p[7:6]} ||
            vga_green != {p[4:2], p[4:2], p[4:3]} || vga_blue != {4{p[1:0]}}) bad++;
      end
      @(negedge pix_clk);
      x++;
      if (x == 800) begin x = 0; y++; end
    end
    chk($sformatf("VGA frame shows frame %0d (%0d wrong)", fr, bad), bad == 0);
    chk("VGA active area 640x480", act == 640 * 480);
    n_vga_frames++;
  endtask

  initial begin
    logic [31:0] cam, mine;
    bytes_t p, f;
    cfg.local_mac = 48'h02_12_34_56_78_9A; cfg.cam_mac = 48'h00_40_8C_01_02_03;
    cfg.local_ip = 32'h0A00_0005; cfg.cam_ip = 32'h0A00_0002;
    cfg.local_port = 16'd40000; cfg.cam_port = 16'd80; cfg.ttl = 8'd64;
    repeat (4) @(negedge clk);
    rst = 0;
    wait (nic_ready);
    chk("NIC started with 0x22", u_ax.cr == 8'h22);
    @(negedge clk) connect = 1;
    @(negedge clk) connect = 0;

    // handshake
    expect_tx("SYN", 6'b000010, iss, 0);
    mine = iss + 2;
    cam  = 32'h2000_0000;
    p.delete();
    u_ax.inject(seg_frame(cam, mine, 6'b010010, p, cfg.local_port));
    cam = cam + 1;
    expect_tx("ACK of SYN", 6'b010000, mine, cam);
    mine = mine + 1;
    chk("established", tcp_state == 2'd2);

    for (int fr = 0; fr < 2; fr++) begin
      t_frame = cyc;
      for (int pos = 0; pos < 38; pos++) begin
        if (fr == 0 && pos == 3) begin
          f = seg_frame(cam, mine, 6'b011000, video(fr, pos), cfg.local_port);
          f[14 + 40 + 200] ^= 8'h81;
          u_ax.inject(f);
          expect_nothing("corrupted segment not acknowledged");
          n_bad_dropped++;
        end
        if (fr == 0 && pos == 7) begin
          u_ax.inject(seg_frame(cam, mine, 6'b011000, video(1, pos), 16'd40001));
          expect_nothing("segment for another port not acknowledged");
          n_foreign_dropped++;
        end
        t_seg = cyc;
        u_ax.inject(seg_frame(cam, mine, 6'b011000, video(fr, pos), cfg.local_port));
        expect_tx("ACK of video", 6'b010000, mine, cam + 513);
        if (fr == 1 && cyc - t_seg > seg_max) seg_max = cyc - t_seg;
        mine = mine + 1;
        if (fr == 0 && pos == 5) begin
          u_ax.inject(seg_frame(cam, mine, 6'b011000, video(fr, pos), cfg.local_port));
          expect_tx("duplicate ACK", 6'b010000, mine, cam + 513);
          mine = mine + 1;
          n_dup++;
        end
        cam = cam + 513;
      end
      wait (frames_copied == 16'(fr + 1));
      if (fr == 1) frame_cycles = cyc - t_frame;
      repeat (4) @(negedge clk);
      check_screen(fr);
      n_frames_shown++;
      if (fr == 0) check_vga(0);
    end

    // close
    p.delete();
    u_ax.inject(seg_frame(cam, mine, 6'b010001, p, cfg.local_port));
    expect_tx("FIN+ACK", 6'b010001, mine, cam + 1);
    repeat (10) @(negedge clk);
    chk("closed", tcp_state == 2'd0);

    // rate: 12 frames/s at 18 ns leaves 4,629,629 clocks per frame, even when
    // every segment waits for the previous one's ACK
    $display("segment to ACK: at most %0d clocks; frame received and copied: %0d clocks",
             seg_max, frame_cycles);
    chk("a frame fits in 1/12 s", frame_cycles > 0 && frame_cycles < 4629629);

    // every mechanism happened
    chk("ring wrapped", ring_wraps > 0);
    chk("RDY wait states", n_rdy_wait > 0);
    chk("interrupt line used", n_irq > 0);
    chk("TXP busy waits", txp_waits > 0);
    chk("corrupted segment dropped", n_bad_dropped == 1);
    chk("foreign segment dropped", n_foreign_dropped == 1);
    chk("duplicate ACK", n_dup == 1 && dup_acks == 16'd1);
    chk("frames copied", frames_copied == 16'd2 && n_frames_shown == 2);
    chk("VGA frame checked", n_vga_frames == 1);
    chk("no frame dropped by NIC", u_ax.rx_dropped == 0);
    $display("mechanisms: wraps=%0d rdy_waits=%0d txp_waits=%0d bad=%0d foreign=%0d dup=%0d frames=%0d rx=%0d tx=%0d",
             ring_wraps, n_rdy_wait, txp_waits, n_bad_dropped, n_foreign_dropped, n_dup,
             frames_copied, rx_count, tx_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
