// screen_buf: the screen buffer holding the picture shown on the VGA output.
//
// A simple dual-port RAM of DEPTH bytes, one byte per pixel, written by the
// video converter in the system clock domain and read by the VGA output in
// the pixel clock domain. The read port is registered: data for `raddr`
// appears one pixel clock later. The default depth, 160 x 120 = 19200 bytes,
// is the design's working resolution; the one-byte pixel (RGB 3-3-2) and the
// memory organisation are this design's choices.
module screen_buf #(
  parameter int unsigned DEPTH = 19200,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          rclk,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge wclk)
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;

  always_ff @(posedge rclk)
    rdata <= (int'(raddr) < DEPTH) ? mem[raddr] : 8'h00;

endmodule
