// video_conv: the video converter; forwards a finished frame from the SRAM
// frame store to the screen buffer.
//
// Received pixel bytes are stored in SRAM at their place in the frame, two
// pixels per 16-bit word starting at word address BASE (pixel 2w in bits
// [7:0], pixel 2w+1 in bits [15:8]). When `start` pulses (the last segment
// of a frame has arrived) the converter reads the FRAME_BYTES/2 words of the
// frame over the shared bus and writes each word's two pixels into the
// screen buffer in two clocks. A `start` that comes while a copy runs is
// remembered and served when it ends.
//
// Interface: bus master port `breq`/`brsp` (see pb_bus_ctrl), screen buffer
// write port `sb_we`/`sb_addr`/`sb_data`, `busy`, and `frames` counting
// completed copies. A copy takes FRAME_BYTES/2 bus reads plus two clocks per
// word. The frames arrive as raw pixels; decoding JPEG or MPEG-4 frames is
// not part of this block.
module video_conv
  import spycam_pkg::*;
#(
  parameter int unsigned FRAME_BYTES = 19200,
  parameter logic [19:0] BASE        = 20'h00000,
  parameter int unsigned AW          = $clog2(FRAME_BYTES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output bus_req_t      breq,
  input  bus_rsp_t      brsp,
  output logic          sb_we,
  output logic [AW-1:0] sb_addr,
  output logic [7:0]    sb_data,
  output logic          busy,
  output logic [15:0]   frames
);
  localparam int unsigned WORDS = FRAME_BYTES / 2;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_LO, S_HI} conv_state_e;

  conv_state_e  st;
  logic [19:0]  w;          // word index within the frame
  logic [15:0]  word_q;
  logic         pending;

  assign busy = (st != S_IDLE);

  always_comb begin
    breq       = '0;
    breq.req   = (st == S_READ);
    breq.we    = 1'b0;
    breq.eth   = 1'b0;
    breq.addr  = BASE + w;
    breq.be    = 2'b11;
    sb_we      = (st == S_LO) || (st == S_HI);
    sb_addr    = AW'({w, (st == S_HI)});
    sb_data    = (st == S_HI) ? word_q[15:8] : word_q[7:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st      <= S_IDLE;
      w       <= '0;
      word_q  <= '0;
      pending <= 1'b0;
      frames  <= '0;
    end else begin
      if (start && st != S_IDLE) pending <= 1'b1;
      unique case (st)
        S_IDLE: if (start || pending) begin
          pending <= 1'b0;
          w       <= '0;
          st      <= S_READ;
        end
        S_READ: if (brsp.done) begin
          word_q <= brsp.rdata;
          st     <= S_LO;
        end
        S_LO: st <= S_HI;
        S_HI: begin
          if (w == 20'(WORDS - 1)) begin
            st     <= S_IDLE;
            frames <= frames + 16'd1;
          end else begin
            w  <= w + 20'd1;
            st <= S_READ;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
