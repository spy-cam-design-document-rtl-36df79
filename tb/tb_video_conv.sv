// tb_video_conv: checks the video converter at the full 160 x 120 frame.
// The SRAM model is loaded with a frame; after `start` every screen buffer
// byte written must be the right pixel of the right SRAM word (one check per
// byte written), each exactly once. A second `start` given while the copy runs must cause one more copy.
// The copy time is checked: with SRAM_WAIT = 1 each word takes one bus cycle
// of three clocks plus two screen buffer writes, 5 clocks per word.
module tb_video_conv;
  import spycam_pkg::*;

  localparam int FB = 19200, AW = $clog2(FB);
  logic clk = 0, rst = 1, start = 0;
  bus_req_t req [2];
  bus_rsp_t rsp [2];
  logic [19:0] pb_a;
  logic [15:0] pb_d_o, pb_d_i;
  logic pb_d_oe, pb_lb_n, pb_ub_n, pb_we_n, pb_oe_n, ram_ce_n, eth_cs_n;
  logic sb_we, busy;
  logic [AW-1:0] sb_addr;
  logic [7:0] sb_data;
  logic [15:0] frames;
  int checks = 0, failures = 0;

  pb_bus_ctrl #(.NM(2), .SRAM_WAIT(1)) u_bus (.clk, .rst, .req, .rsp, .pb_a, .pb_d_o, .pb_d_oe,
    .pb_d_i, .pb_lb_n, .pb_ub_n, .pb_we_n, .pb_oe_n, .ram_ce_n, .eth_cs_n, .eth_rdy(1'b1));
  sram_model #(.WORDS(65536)) u_sram (.clk, .ce_n(ram_ce_n), .oe_n(pb_oe_n), .we_n(pb_we_n),
    .lb_n(pb_lb_n), .ub_n(pb_ub_n), .a(pb_a[17:0]), .d_i(pb_d_o), .d_o(pb_d_i));
  video_conv #(.FRAME_BYTES(FB), .BASE(20'h00100)) dut (.clk, .rst, .start, .breq(req[0]),
    .brsp(rsp[0]), .sb_we, .sb_addr, .sb_data, .busy, .frames);
  assign req[1] = '0;

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int writes [FB];
  int bad = 0;
  always @(posedge clk) if (sb_we && !rst) begin
    logic [15:0] w;
    w = u_sram.mem[32'h100 + int'(sb_addr) / 2];
    writes[sb_addr]++;
    checks++;
    if (sb_data != (sb_addr[0] ? w[15:8] : w[7:0])) begin failures++; bad++; end
  end

  initial begin
    longint t0, t1;
    for (int i = 0; i < 65536; i++) u_sram.mem[i] = 16'(i * 16'h9E37 + 16'h1234);
    for (int i = 0; i < FB; i++) writes[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = $time;
    repeat (100) @(negedge clk);
    start = 1; @(negedge clk) start = 0;       // second frame while busy
    wait (frames == 16'd1);
    t1 = $time;
    checks++;
    for (int i = 0; i < FB; i++) if (writes[i] != 1) begin failures++; $display("byte %0d written %0d times", i, writes[i]); break; end
    checks++;
    if ((t1 - t0) / 10 < 5 * FB / 2 - 2 || (t1 - t0) / 10 > 5 * FB / 2 + 2) begin
      failures++; $display("copy took %0d clocks", (t1 - t0) / 10);
    end
    wait (frames == 16'd2);
    @(negedge clk);
    checks += 2;
    if (busy) begin failures++; $display("still busy"); end
    for (int i = 0; i < FB; i++) if (writes[i] != 2) begin failures++; $display("second copy byte %0d", i); break; end
    if (bad != 0) $display("%0d wrong pixels", bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
