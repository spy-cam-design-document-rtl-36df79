// vga_out: VGA output; shows the screen buffer on a 640 x 480 display.
//
// Horizontal and vertical counters run over the whole line and frame
// (active + front porch + sync + back porch). During the active area each
// screen pixel fetches source pixel (y / SCALE, x / SCALE) of the SRC_W x
// SRC_H picture from the screen buffer, so the 160 x 120 picture is shown
// enlarged four times in each direction. The screen buffer read takes one
// clock, so syncs and blanking are delayed by one clock to line up with the
// data, and all outputs are registered: outputs lag the counters by two
// pixel clocks.
//
// Interface: runs on the pixel clock (36 ns period in the design's clock
// plan). `sb_raddr` -> `sb_rdata` is the screen buffer read port. The pixel
// byte is RGB 3-3-2, expanded to 8 bits per colour; syncs are active low;
// `frame_start` pulses at the first pixel of each frame. The 640 x 480 mode
// standard timing numbers, the colour format and the scaling are this
// design's choices.
module vga_out #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned SRC_W    = 160,
  parameter int unsigned SRC_H    = 120,
  parameter int unsigned SCALE    = 4,
  parameter int unsigned AW       = $clog2(SRC_W * SRC_H)
) (
  input  logic          clk,
  input  logic          rst,
  output logic [AW-1:0] sb_raddr,
  input  logic [7:0]    sb_rdata,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          active,
  output logic [7:0]    red,
  output logic [7:0]    green,
  output logic [7:0]    blue,
  output logic          frame_start
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [11:0] hc, vc;
  logic        act0, hs0, vs0, fs0;
  logic        act1, hs1, vs1, fs1;

  always_ff @(posedge clk) begin
    if (rst) begin
      hc <= '0;
      vc <= '0;
    end else if (hc == 12'(H_TOTAL - 1)) begin
      hc <= '0;
      vc <= (vc == 12'(V_TOTAL - 1)) ? 12'd0 : vc + 12'd1;
    end else begin
      hc <= hc + 12'd1;
    end
  end

  always_comb begin
    act0 = (hc < 12'(H_ACTIVE)) && (vc < 12'(V_ACTIVE));
    hs0  = !((hc >= 12'(H_ACTIVE + H_FP)) && (hc < 12'(H_ACTIVE + H_FP + H_SYNC)));
    vs0  = !((vc >= 12'(V_ACTIVE + V_FP)) && (vc < 12'(V_ACTIVE + V_FP + V_SYNC)));
    fs0  = (hc == 12'd0) && (vc == 12'd0);
    sb_raddr = act0 ? AW'((32'(vc) / SCALE) * SRC_W + 32'(hc) / SCALE) : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {act1, hs1, vs1, fs1} <= 4'b0110;
      {active, hsync_n, vsync_n, frame_start} <= 4'b0110;
      {red, green, blue} <= '0;
    end else begin
      {act1, hs1, vs1, fs1} <= {act0, hs0, vs0, fs0};
      {active, hsync_n, vsync_n, frame_start} <= {act1, hs1, vs1, fs1};
      red   <= act1 ? {sb_rdata[7:5], sb_rdata[7:5], sb_rdata[7:6]} : 8'h00;
      green <= act1 ? {sb_rdata[4:2], sb_rdata[4:2], sb_rdata[4:3]} : 8'h00;
      blue  <= act1 ? {4{sb_rdata[1:0]}} : 8'h00;
    end
  end

endmodule
