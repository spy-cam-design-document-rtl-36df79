// tb_nic_ctrl: checks the AX88796 driver against the behavioural NIC and
// SRAM models, with the real bus controller, parser and packet builder.
//  - after init the NIC registers hold the ring layout, station address,
//    interrupt mask, and the command register was last set to 0x22;
//  - 30 video segments are injected one after another (enough to wrap the
//    receive ring); each one's 512 pixels must land in SRAM at
//    pos*512 + offset, and BNRY must follow the ring;
//  - a segment for another port must leave SRAM untouched;
//  - two packets are sent back to back: the frames the NIC transmits must
//    match the testbench's own frame byte for byte, and the second one must
//    wait for the first to finish (TXP polling).
module tb_nic_ctrl;
  import spycam_pkg::*;
  import tb_net_pkg::*;

  logic clk = 0, rst = 1;
  link_cfg_t cfg;
  bus_req_t req [2];
  bus_rsp_t rsp [2];
  logic [19:0] pb_a;
  logic [15:0] pb_d_o, pb_d_i, sram_d, eth_d;
  logic pb_d_oe, pb_lb_n, pb_ub_n, pb_we_n, pb_oe_n, ram_ce_n, eth_cs_n, eth_rdy, eth_ireq;
  logic rx_sop, rx_valid, rx_eop, pay_valid, seg_valid;
  logic [7:0] rx_byte, pay_pos, pay_byte;
  logic [15:0] pay_off;
  rx_seg_t seg;
  logic tx_req = 0, tx_load, tx_done, ready;
  logic [4:0] tx_widx;
  logic [15:0] tx_wdata, rx_count, tx_count, txp_waits, ring_wraps, ipc, tcpc;
  logic [5:0] tx_flags = 0;
  logic [31:0] tx_seq = 0, tx_ack = 0;
  int checks = 0, failures = 0;

  pb_bus_ctrl #(.NM(2)) u_bus (.clk, .rst, .req, .rsp, .pb_a, .pb_d_o, .pb_d_oe, .pb_d_i,
    .pb_lb_n, .pb_ub_n, .pb_we_n, .pb_oe_n, .ram_ce_n, .eth_cs_n, .eth_rdy);
  assign req[1] = '0;
  sram_model u_sram (.clk, .ce_n(ram_ce_n), .oe_n(pb_oe_n), .we_n(pb_we_n), .lb_n(pb_lb_n),
    .ub_n(pb_ub_n), .a(pb_a[17:0]), .d_i(pb_d_o), .d_o(sram_d));
  ax88796_model u_ax (.clk, .cs_n(eth_cs_n), .oe_n(pb_oe_n), .we_n(pb_we_n), .a(pb_a[4:0]),
    .d_i(pb_d_o), .d_o(eth_d), .rdy(eth_rdy), .ireq(eth_ireq));
  assign pb_d_i = !ram_ce_n ? sram_d : eth_d;

  nic_ctrl dut (.clk, .rst, .cfg, .eth_ireq, .breq(req[0]), .brsp(rsp[0]),
    .rx_sop, .rx_valid, .rx_byte, .rx_eop, .pay_valid, .pay_pos, .pay_off, .pay_byte,
    .tx_req, .tx_load, .tx_widx, .tx_wdata, .tx_done,
    .ready, .rx_count, .tx_count, .txp_waits, .ring_wraps);
  ip_tcp_rx u_rx (.clk, .rst, .cfg, .sop(rx_sop), .in_valid(rx_valid), .in_byte(rx_byte),
    .eop(rx_eop), .pay_valid, .pay_pos, .pay_off, .pay_byte, .seg_valid, .seg);
  ip_tcp_tx u_tx (.clk, .rst, .load(tx_load), .cfg, .flags(tx_flags), .seq(tx_seq), .ack(tx_ack),
    .pos(8'h00), .widx(tx_widx), .wdata(tx_wdata), .ip_csum(ipc), .tcp_csum(tcpc));

  always #9 clk = ~clk;

  initial begin
    #40ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic byte unsigned sram_byte(int a);
    logic [15:0] w;
    w = u_sram.mem[a / 2];
    return a[0] ? w[15:8] : w[7:0];
  endfunction

  task automatic video(int pos, int fr, logic [15:0] dport);
    bytes_t p, f;
    p.push_back(8'(pos));
    for (int i = 0; i < 512; i++) p.push_back(pixel(fr, pos, i));
    f = make_frame(cfg.local_mac, cfg.cam_mac, cfg.cam_ip, cfg.local_ip, cfg.cam_port,
                   dport, 32'(1000 + pos * 513), 32'h55, 6'b011000, p, 16'(pos));
    u_ax.inject(f);
  endtask

  task automatic send(logic [5:0] fl, logic [31:0] sq, logic [31:0] ak);
    @(negedge clk);
    tx_flags = fl; tx_seq = sq; tx_ack = ak; tx_req = 1;
    while (!tx_done) @(negedge clk);
    tx_req = 0;
  endtask

  initial begin
    bytes_t e, pl;
    int n;
    cfg.local_mac = 48'h02_12_34_56_78_9A; cfg.cam_mac = 48'h02_00_00_00_00_02;
    cfg.local_ip = 32'hC0A8_0105; cfg.cam_ip = 32'hC0A8_0102;
    cfg.local_port = 16'd5000; cfg.cam_port = 16'd8080; cfg.ttl = 8'd32;
    repeat (3) @(negedge clk);
    rst = 0;
    wait (ready);
    @(negedge clk);
    chk("pstart", u_ax.pstart == 8'h46);
    chk("pstop", u_ax.pstop == 8'h80);
    chk("tpsr", u_ax.tpsr == 8'h40);
    chk("imr", u_ax.imr == 8'h01);
    chk("curr", u_ax.curr == 8'h47);
    chk("cr activated", u_ax.cr == 8'h22);
    for (int i = 0; i < 6; i++) chk("par", u_ax.par[i] == cfg.local_mac[47-8*i -: 8]);

    // video segments, one at a time
    for (int k = 0; k < 30; k++) begin
      int pos;
      pos = k % 38;
      n = rx_count;
      video(pos, k / 38, cfg.local_port);
      wait (rx_count == 16'(n + 1));
      repeat (10) @(negedge clk);
      checks++;
      for (int i = 0; i < 512; i++)
        if (pos * 512 + i < 19200 && sram_byte(pos * 512 + i) != pixel(k / 38, pos, i)) begin
          failures++;
          $display("seg %0d pos %0d byte %0d: %h != %h", k, pos, i, sram_byte(pos * 512 + i), pixel(k / 38, pos, i));
          break;
        end
      chk("bnry follows", u_ax.bnry == ((u_ax.curr == 8'h46) ? 8'h7F : u_ax.curr - 8'd1));
      chk("segment parsed ok", u_rx.seg.ok);
    end
    chk("ring wrapped", ring_wraps > 0);
    chk("nothing dropped", u_ax.rx_dropped == 0);

    // another port: SRAM unchanged (pos 2 would get frame-1 pixels)
    n = rx_count;
    video(2, 1, 16'd5001);
    wait (rx_count == 16'(n + 1));
    repeat (10) @(negedge clk);
    checks++;
    for (int i = 0; i < 512; i++)
      if (sram_byte(2 * 512 + i) != pixel(0, 2, i)) begin failures++; $display("foreign segment written %0d %h %h %h", i, sram_byte(2 * 512 + i), pixel(0, 2, i), pixel(1, 2, i)); break; end

    // two packets back to back
    send(6'b010000, 32'hABCD_0001, 32'h1234_5678);
    send(6'b010001, 32'hABCD_0002, 32'h1234_5679);
    wait (u_ax.tx_q.size() == 2);
    chk("txp waited", txp_waits > 0);
    for (int j = 0; j < 2; j++) begin
      bytes_t got;
      got = u_ax.tx_q.pop_front();
      pl.delete(); pl.push_back(8'h00);
      e = make_frame(cfg.cam_mac, cfg.local_mac, cfg.local_ip, cfg.cam_ip, cfg.local_port,
                     cfg.cam_port, 32'hABCD_0001 + j, 32'h1234_5678 + j,
                     j == 0 ? 6'b010000 : 6'b010001, pl, 16'(j + 1), cfg.ttl, TCP_WINDOW);
      checks++;
      if (got.size() != 60) begin failures++; $display("tx size %0d tbcr %h", got.size(), u_ax.tbcr); end
      else for (int i = 0; i < 60; i++)
        if (got[i] != e[i]) begin failures++; $display("tx %0d byte %0d: %h != %h", j, i, got[i], e[i]); break; end
    end
    chk("tx count", tx_count == 16'd2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
