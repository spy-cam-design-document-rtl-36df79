// tb_screen_buf: checks the dual-clock screen buffer at its full depth.
// Fills all 19200 bytes from the write clock, then reads them back on an
// unrelated read clock, checking each byte and the one-clock read latency.
module tb_screen_buf;
  localparam int D = 19200, AW = $clog2(D);
  logic wclk = 0, rclk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  screen_buf #(.DEPTH(D)) dut (.*);

  always #9 wclk = ~wclk;
  always #7 rclk = ~rclk;

  function automatic logic [7:0] pat(int i);
    return 8'((i * 151) ^ (i >> 7));
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge wclk);
      we = 1; waddr = AW'(i); wdata = pat(i);
    end
    @(negedge wclk) we = 0;
    for (int i = 0; i < D; i += 7) begin
      @(negedge rclk) raddr = AW'(i);
      @(posedge rclk); #1;
      checks++;
      if (rdata != pat(i)) begin failures++; $display("addr %0d: %h != %h", i, rdata, pat(i)); end
    end
    // a write after the fill is seen by a later read
    @(negedge wclk) begin we = 1; waddr = 5; wdata = 8'hA5; end
    @(negedge wclk) we = 0;
    @(negedge rclk) raddr = 5;
    @(posedge rclk); #1;
    checks++;
    if (rdata != 8'hA5) begin failures++; $display("rewrite %h", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
