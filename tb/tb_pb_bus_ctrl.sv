// tb_pb_bus_ctrl: checks the shared bus controller.
// Two masters issue random SRAM reads and writes (with byte enables) and
// Ethernet register reads/writes at the same time. SRAM results are checked
// against a reference copy kept by the testbench; Ethernet accesses go to a
// small register file whose RDY is held low for random times. Also checks
// that chip selects are never active together, that both masters get served
// (round robin), and the SRAM cycle time: one arbitration clock, SRAM_WAIT
// clocks with the strobe active, done in the clock after.
module tb_pb_bus_ctrl;
  import spycam_pkg::*;

  localparam int SW = 1, EW = 3;
  logic clk = 0, rst = 1;
  bus_req_t req [2];
  bus_rsp_t rsp [2];
  logic [19:0] pb_a;
  logic [15:0] pb_d_o, pb_d_i, sram_d, eth_d;
  logic pb_d_oe, pb_lb_n, pb_ub_n, pb_we_n, pb_oe_n, ram_ce_n, eth_cs_n, eth_rdy;
  int checks = 0, failures = 0;

  pb_bus_ctrl #(.NM(2), .SRAM_WAIT(SW), .ETH_WAIT(EW)) dut (.*);
  sram_model #(.WORDS(1024)) u_sram (.clk, .ce_n(ram_ce_n), .oe_n(pb_oe_n), .we_n(pb_we_n),
    .lb_n(pb_lb_n), .ub_n(pb_ub_n), .a(pb_a[17:0]), .d_i(pb_d_o), .d_o(sram_d));

  // Ethernet side: 32 registers, RDY low for a random time per access;
  // data is valid and writes are taken only while RDY is high
  logic [15:0] eregs [32];
  int rdy_wait = 0, rdy_low_cycles = 0;
  logic cs_q = 1;
  assign eth_rdy = (rdy_wait == 0);
  assign eth_d = (!eth_cs_n && !pb_oe_n) ? (eth_rdy ? eregs[pb_a[4:0]] : 16'hDEAD) : 16'h0000;
  always @(posedge clk) begin
    cs_q <= eth_cs_n;
    if (!eth_cs_n && cs_q) rdy_wait <= $urandom_range(0, 6);
    else if (rdy_wait > 0) rdy_wait <= rdy_wait - 1;
    if (!eth_cs_n && !eth_rdy) rdy_low_cycles++;
    if (!eth_cs_n && !pb_we_n && eth_rdy) eregs[pb_a[4:0]] <= pb_d_o;
  end
  assign pb_d_i = !ram_ce_n ? sram_d : eth_d;

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (!ram_ce_n && !eth_cs_n) begin failures++; $display("both selected"); end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] ref_sram [1024];
  logic [15:0] ref_eth  [32];
  int served [2];

  task automatic access(int m, bit eth, bit we, int addr, logic [15:0] wd, logic [1:0] be,
                        output logic [15:0] rd, output int lat);
    int t0;
    @(negedge clk);
    req[m].req = 1; req[m].eth = eth; req[m].we = we; req[m].addr = 20'(addr);
    req[m].wdata = wd; req[m].be = be;
    t0 = 0;
    do begin @(posedge clk); t0++; end while (!rsp[m].done);
    rd = rsp[m].rdata;
    lat = t0;
    @(negedge clk) req[m] = '0;
    served[m]++;
  endtask

  task automatic master(int m, int n);
    logic [15:0] rd, wd;
    int lat;
    for (int i = 0; i < n; i++) begin
      bit eth = ($urandom_range(0, 3) == 0);
      bit we  = $urandom_range(0, 1);
      int ad  = eth ? $urandom_range(0, 31) : (m * 512 + $urandom_range(0, 511));
      logic [1:0] be = eth ? 2'b11 : 2'($urandom_range(1, 3));
      wd = 16'($urandom);
      access(m, eth, we, ad, wd, be, rd, lat);
      if (eth) begin
        if (we) ref_eth[ad] = wd;
        else begin
          checks++;
          if (rd != ref_eth[ad]) begin failures++; $display("eth rd %0d: %h != %h", ad, rd, ref_eth[ad]); end
        end
      end else begin
        if (we) begin
          if (be[0]) ref_sram[ad][7:0]  = wd[7:0];
          if (be[1]) ref_sram[ad][15:8] = wd[15:8];
        end else begin
          checks++;
          if (rd != ref_sram[ad]) begin failures++; $display("sram rd %0d: %h != %h", ad, rd, ref_sram[ad]); end
        end
      end
    end
  endtask

  initial begin
    logic [15:0] rd;
    int lat;
    req[0] = '0; req[1] = '0;
    for (int i = 0; i < 1024; i++) ref_sram[i] = 16'h0000;
    for (int i = 0; i < 32; i++) begin ref_eth[i] = 16'(i * 3); eregs[i] = 16'(i * 3); end
    served[0] = 0; served[1] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // lone SRAM access: idle, SW access clocks, done in the next
    access(0, 0, 1, 5, 16'hBEEF, 2'b11, rd, lat);
    access(0, 0, 0, 5, 16'h0000, 2'b11, rd, lat);
    ref_sram[5] = 16'hBEEF;
    checks += 2;
    if (rd != 16'hBEEF) begin failures++; $display("single read %h", rd); end
    if (lat != SW + 2) begin failures++; $display("SRAM latency %0d, expected %0d", lat, SW + 2); end
    fork
      master(0, 400);
      master(1, 400);
    join
    checks += 2;
    if (served[0] < 400 || served[1] < 400) begin failures++; $display("served %0d %0d", served[0], served[1]); end
    if (rdy_low_cycles == 0) begin failures++; $display("RDY never low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
