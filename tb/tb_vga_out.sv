// tb_vga_out: checks the VGA output on a small mode (16 x 8 active, 4 x 2
// source picture, scale 4) for two frames: line and frame periods, sync
// pulse positions and widths, the active area, and that every active pixel
// shows source pixel (y/4, x/4) expanded from RGB 3-3-2. The expected
// values come from the testbench's own position counters, started at the
// first `frame_start`.
module tb_vga_out;
  localparam int HA = 16, HF = 2, HS = 3, HB = 3, VA = 8, VF = 1, VS = 2, VB = 1;
  localparam int SW = 4, SH = 2, SC = 4, AW = 3;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  logic clk = 0, rst = 1;
  logic [AW-1:0] sb_raddr;
  logic [7:0] sb_rdata;
  logic hsync_n, vsync_n, active, frame_start;
  logic [7:0] red, green, blue;
  int checks = 0, failures = 0;

  vga_out #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB), .V_ACTIVE(VA), .V_FP(VF),
            .V_SYNC(VS), .V_BP(VB), .SRC_W(SW), .SRC_H(SH), .SCALE(SC), .AW(AW)) dut (.*);

  logic [7:0] pic [SW * SH];
  always @(posedge clk) sb_rdata <= pic[sb_raddr];

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, frames;
    logic [7:0] p, er, eg, eb;
    for (int i = 0; i < SW * SH; i++) pic[i] = 8'(i * 37 + 5);
    repeat (3) @(negedge clk);
    rst = 0;
    while (!frame_start) @(negedge clk);
    x = 0; y = 0; frames = 0;
    while (frames < 2) begin
      bit ea, eh, ev;
      ea = (x < HA) && (y < VA);
      eh = !((x >= HA + HF) && (x < HA + HF + HS));
      ev = !((y >= VA + VF) && (y < VA + VF + VS));
      p  = pic[(y / SC) * SW + x / SC];
      er = ea ? {p[7:5], p[7:5], p[7:6]} : 8'h00;
      eg = ea ? {p[4:2], p[4:2], p[4:3]} : 8'h00;
      eb = ea ? {4{p[1:0]}} : 8'h00;
      checks++;
      if (active != ea || hsync_n != eh || vsync_n != ev || red != er || green != eg ||
          blue != eb || frame_start != (x == 0 && y == 0)) begin
        failures++;
        if (failures < 5) $display("x=%0d y=%0d act %b/%b hs %b/%b vs %b/%b rgb %h%h%h/%h%h%h",
          x, y, active, ea, hsync_n, eh, vsync_n, ev, red, green, blue, er, eg, eb);
      end
      @(negedge clk);
      x++;
      if (x == HT) begin
        x = 0; y++;
        if (y == VT) begin y = 0; frames++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
