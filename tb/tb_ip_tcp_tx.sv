// tb_ip_tcp_tx: checks the acknowledgement packet builder.
// Random link settings, flags and sequence numbers are loaded; the 60-byte
// frame read out word by word must equal, byte for byte, the frame the
// testbench builds itself from the IPv4/TCP layouts, and both checksums must
// verify. The identification field must advance by one per packet.
module tb_ip_tcp_tx;
  import spycam_pkg::*;
  import tb_net_pkg::*;

  logic clk = 0, rst = 1, load = 0;
  link_cfg_t cfg;
  logic [5:0] flags;
  logic [31:0] seq, ack;
  logic [7:0] pos;
  logic [4:0] widx;
  logic [15:0] wdata, ip_csum, tcp_csum;
  int checks = 0, failures = 0;

  ip_tcp_tx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t got, exp, pl;
    cfg = '0; flags = '0; seq = '0; ack = '0; pos = '0; widx = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int it = 0; it < 40; it++) begin
      cfg.local_mac  = {$urandom, $urandom};
      cfg.cam_mac    = {$urandom, $urandom};
      cfg.local_ip   = $urandom;
      cfg.cam_ip     = $urandom;
      cfg.local_port = 16'($urandom);
      cfg.cam_port   = 16'($urandom);
      cfg.ttl        = 8'($urandom_range(1, 255));
      flags = 6'($urandom);
      seq   = $urandom;
      ack   = $urandom;
      pos   = (it % 2 == 0) ? 8'h00 : 8'($urandom);
      @(negedge clk) load = 1;
      @(negedge clk) load = 0;
      got.delete();
      for (int w = 0; w < 30; w++) begin
        widx = 5'(w);
        #1;
        got.push_back(wdata[7:0]);
        got.push_back(wdata[15:8]);
      end
      pl.delete();
      pl.push_back(pos);
      exp = make_frame(cfg.cam_mac, cfg.local_mac, cfg.local_ip, cfg.cam_ip,
                       cfg.local_port, cfg.cam_port, seq, ack, flags, pl,
                       16'(it + 1), cfg.ttl, TCP_WINDOW);
      checks++;
      if (got.size() != exp.size()) begin
        failures++;
        $display("size %0d != %0d", got.size(), exp.size());
      end else begin
        int bad = 0;
        for (int i = 0; i < exp.size(); i++)
          if (got[i] != exp[i]) begin
            bad++;
            if (bad < 4) $display("it %0d byte %0d: got %02x exp %02x", it, i, got[i], exp[i]);
          end
        if (bad != 0) failures++;
      end
      checks += 3;
      if (!ip_csum_ok(got)) begin failures++; $display("ip checksum bad"); end
      if (!tcp_csum_ok(got)) begin failures++; $display("tcp checksum bad"); end
      if (get16(got, 16) != 16'd41) begin failures++; $display("total length %0d", get16(got, 16)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
