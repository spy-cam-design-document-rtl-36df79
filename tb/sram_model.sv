// sram_model: behavioural model of a 256K x 16 asynchronous SRAM for the
// testbenches. Reads are combinational while chip enable and output enable
// are low; writes take the byte lanes selected by LB_N / UB_N on every clock
// edge where chip enable and write enable are low.
module sram_model #(
  parameter int unsigned WORDS = 262144
) (
  input  logic        clk,
  input  logic        ce_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic        lb_n,
  input  logic        ub_n,
  input  logic [17:0] a,
  input  logic [15:0] d_i,
  output logic [15:0] d_o
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [15:0] mem [WORDS];
  logic [AW-1:0] wa;
  assign wa = a[AW-1:0];   // a smaller model ignores the upper address bits

  initial for (int i = 0; i < WORDS; i++) mem[i] = 16'h0000;

  assign d_o = (!ce_n && !oe_n) ? mem[wa] : 16'h0000;

  always @(posedge clk)
    if (!ce_n && !we_n) begin
      if (!lb_n) mem[wa][7:0]  <= d_i[7:0];
      if (!ub_n) mem[wa][15:8] <= d_i[15:8];
    end
endmodule
