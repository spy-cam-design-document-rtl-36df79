// tb_ip_tcp_rx: checks the receive parser.
// Feeds frames built by the testbench: good 553-byte video segments, a
// segment with a corrupted pixel (TCP checksum must fail), one with a bad IP
// header checksum, one to another port, a truncated one, a short one with an
// odd payload length, and a SYN+ACK without payload. Checks the segment
// summary and that exactly the pixel bytes of acceptable headers stream out,
// each with the right offset and positioning byte.
module tb_ip_tcp_rx;
  import spycam_pkg::*;
  import tb_net_pkg::*;

  logic clk = 0, rst = 1;
  link_cfg_t cfg;
  logic sop = 0, in_valid = 0, eop = 0;
  logic [7:0] in_byte = 0;
  logic pay_valid, seg_valid;
  logic [7:0] pay_pos, pay_byte;
  logic [15:0] pay_off;
  rx_seg_t seg;
  int checks = 0, failures = 0;

  ip_tcp_rx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pixel bytes seen
  int npay;
  byte unsigned pay_seen[$];
  int bad_off;
  always @(posedge clk)
    if (pay_valid) begin
      if (int'(pay_off) != npay) bad_off++;
      pay_seen.push_back(pay_byte);
      npay++;
    end

  task automatic feed(bytes_t f, int n, output rx_seg_t s);
    npay = 0; bad_off = 0; pay_seen.delete();
    @(negedge clk) sop = 1;
    @(negedge clk) sop = 0;
    for (int i = 0; i < n; i++) begin
      in_valid = 1; in_byte = f[i];
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
    end
    in_valid = 0;
    eop = 1;
    @(negedge clk) eop = 0;
    if (!seg_valid) begin failures++; $display("no seg_valid"); end
    s = seg;
  endtask

  function automatic bytes_t video(int pos, int plen);
    bytes_t p;
    p.push_back(8'(pos));
    for (int i = 0; i < plen; i++) p.push_back(pixel(0, pos, i));
    return p;
  endfunction

  task automatic expect_seg(string name, rx_seg_t s, bit ok, int npix, logic [31:0] sq,
                            logic [5:0] fl, int plen, int pos);
    checks++;
    if (s.ok !== ok || npay != npix || bad_off != 0 ||
        (ok && (s.seq != sq || s.flags != fl || int'(s.pay_len) != plen || int'(s.pos) != pos))) begin
      failures++;
      $display("%s: ok=%0d npay=%0d badoff=%0d seq=%h flags=%b len=%0d pos=%0d", name,
               s.ok, npay, bad_off, s.seq, s.flags, s.pay_len, s.pos);
    end
  endtask

  initial begin
    bytes_t f, p;
    rx_seg_t s;
    cfg.local_mac = 48'h02_00_00_00_00_01; cfg.cam_mac = 48'h02_00_00_00_00_02;
    cfg.local_ip = 32'hC0A8_0001; cfg.cam_ip = 32'hC0A8_0002;
    cfg.local_port = 16'd5000; cfg.cam_port = 16'd80; cfg.ttl = 8'd64;
    repeat (3) @(negedge clk);
    rst = 0;

    for (int k = 0; k < 4; k++) begin
      int pos;
      logic [31:0] sq;
      pos = $urandom_range(0, 37);
      sq  = $urandom;
      p = video(pos, 512);
      f = make_frame(cfg.local_mac, cfg.cam_mac, cfg.cam_ip, cfg.local_ip, cfg.cam_port,
                     cfg.local_port, sq, 32'h1234, 6'b011000, p, 16'(k));
      checks++;
      if (f.size() != 14 + 553) begin failures++; $display("frame size %0d", f.size()); end
      feed(f, f.size() + 4, s);     // + CRC bytes
      expect_seg("good", s, 1, 512, sq, 6'b011000, 513, pos);
      checks++;
      for (int i = 0; i < 512; i++)
        if (pay_seen[i] != pixel(0, pos, i)) begin failures++; $display("pixel %0d", i); break; end
    end

    // corrupted pixel: header still good (pixels stream), TCP checksum fails
    p = video(3, 512);
    f = make_frame(cfg.local_mac, cfg.cam_mac, cfg.cam_ip, cfg.local_ip, cfg.cam_port,
                   cfg.local_port, 32'd100, 0, 6'b010000, p, 0);
    f[14 + 40 + 100] ^= 8'h5A;
    feed(f, f.size(), s);
    expect_seg("corrupt", s, 0, 512, 0, 0, 0, 0);

    // IP header checksum broken: no pixels
    f = make_frame(cfg.local_mac, cfg.cam_mac, cfg.cam_ip, cfg.local_ip, cfg.cam_port,
                   cfg.local_port, 32'd100, 0, 6'b010000, p, 0);
    f[24] ^= 8'h01;
    feed(f, f.size(), s);
    expect_seg("ipcsum", s, 0, 0, 0, 0, 0, 0);

    // another port
    f = make_frame(cfg.local_mac, cfg.cam_mac, cfg.cam_ip, cfg.local_ip, cfg.cam_port,
                   16'd5001, 32'd100, 0, 6'b010000, p, 0);
    feed(f, f.size(), s);
    expect_seg("port", s, 0, 0, 0, 0, 0, 0);

    // truncated
    f = make_frame(cfg.local_mac, cfg.cam_mac, cfg.cam_ip, cfg.local_ip, cfg.cam_port,
                   cfg.local_port, 32'd100, 0, 6'b010000, p, 0);
    feed(f, 300, s);
    expect_seg("trunc", s, 0, 300 - 55, 0, 0, 0, 0);

    // odd payload length: positioning byte + 6 pixels (frame padded to 60)
    p = video(9, 6);
    f = make_frame(cfg.local_mac, cfg.cam_mac, cfg.cam_ip, cfg.local_ip, cfg.cam_port,
                   cfg.local_port, 32'hFFFF_FFF0, 0, 6'b011001, p, 0);
    feed(f, f.size(), s);
    expect_seg("odd", s, 1, 6, 32'hFFFF_FFF0, 6'b011001, 7, 9);

    // SYN+ACK without payload
    p.delete();
    f = make_frame(cfg.local_mac, cfg.cam_mac, cfg.cam_ip, cfg.local_ip, cfg.cam_port,
                   cfg.local_port, 32'h0BAD_F00D, 32'h77, 6'b010010, p, 0);
    feed(f, f.size(), s);
    expect_seg("synack", s, 1, 0, 32'h0BAD_F00D, 6'b010010, 0, 0);
    checks++;
    if (s.ack != 32'h77) begin failures++; $display("ack field %h", s.ack); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
