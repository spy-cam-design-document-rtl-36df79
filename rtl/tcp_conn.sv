// tcp_conn: the FPGA's end of the TCP connection to the camera.
//
// The FPGA opens the connection (client side) and then receives the video
// stream, acknowledging every segment. States:
//   CLOSED      -- `connect` queues a SYN with sequence number `iss`.
//   SYN_SENT    -- a good segment with SYN+ACK acknowledging our SYN sets
//                  the receive sequence and queues an ACK; -> ESTABLISHED.
//   ESTABLISHED -- an in-order segment (seq == rcv_nxt) advances rcv_nxt by
//                  its payload length (plus one for FIN), pulses `accept`
//                  and queues an ACK. An out-of-order or repeated segment
//                  queues a duplicate ACK of rcv_nxt. FIN queues FIN+ACK and
//                  closes; RST closes at once.
// Every packet the FPGA sends carries one positioning byte, so each one
// advances snd_nxt by one, plus one for SYN or FIN.
//
// Interface: `seg_valid`/`seg` come from the packet parser once per
// received frame (segments with `seg.ok` low are ignored). A queued packet
// is offered on `tx_req` with `tx_flags`, `tx_seq`, `tx_ack` until the NIC
// driver pulses `tx_done`. `accept`/`accept_pos` report an in-order video
// segment in the cycle after its summary arrives. The handshake and the
// acknowledgement of segments follow the design; sequence-space accounting
// of the positioning byte, the duplicate ACK and the FIN handling are this
// design's choices (no retransmission timer: a lost SYN is retried by
// pulsing `connect` again).
module tcp_conn
  import spycam_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        connect,
  input  logic [31:0] iss,
  input  logic        seg_valid,
  input  rx_seg_t     seg,
  output logic        tx_req,
  output logic [5:0]  tx_flags,
  output logic [31:0] tx_seq,
  output logic [31:0] tx_ack,
  input  logic        tx_done,
  output logic        accept,
  output logic [7:0]  accept_pos,
  output logic [1:0]  state,       // 0 closed, 1 syn_sent, 2 established
  output logic [15:0] dup_acks     // duplicate ACKs sent
);
  typedef enum logic [1:0] {CLOSED = 2'd0, SYN_SENT = 2'd1, ESTABLISHED = 2'd2} tcp_state_e;

  tcp_state_e  st;
  logic [31:0] snd_nxt, rcv_nxt;
  logic        close_after_tx;

  assign state  = st;
  assign tx_seq = snd_nxt;
  assign tx_ack = rcv_nxt;

  localparam logic [5:0] F_SYN    = 6'(1 << TCP_SYN);
  localparam logic [5:0] F_ACK    = 6'(1 << TCP_ACK);
  localparam logic [5:0] F_FINACK = 6'((1 << TCP_FIN) | (1 << TCP_ACK));

  always_ff @(posedge clk) begin
    accept <= 1'b0;
    if (rst) begin
      st             <= CLOSED;
      snd_nxt        <= '0;
      rcv_nxt        <= '0;
      tx_req         <= 1'b0;
      tx_flags       <= '0;
      close_after_tx <= 1'b0;
      accept_pos     <= '0;
      dup_acks       <= '0;
    end else begin
      if (tx_req && tx_done) begin
        tx_req  <= 1'b0;
        snd_nxt <= snd_nxt + 32'(POS_BYTES) + 32'(tx_flags[TCP_SYN]) + 32'(tx_flags[TCP_FIN]);
        if (close_after_tx) begin
          st             <= CLOSED;
          close_after_tx <= 1'b0;
        end
      end

      if (st == CLOSED && connect && !tx_req) begin
        snd_nxt  <= iss;
        tx_flags <= F_SYN;
        tx_req   <= 1'b1;
        st       <= SYN_SENT;
      end

      if (seg_valid && seg.ok) begin
        unique case (st)
          SYN_SENT: begin
            if (seg.flags[TCP_RST]) begin
              st <= CLOSED;
            end else if (seg.flags[TCP_SYN] && seg.flags[TCP_ACK] &&
                         seg.ack == snd_nxt && !tx_req) begin
              rcv_nxt  <= seg.seq + 32'd1 + 32'(seg.pay_len);
              tx_flags <= F_ACK;
              tx_req   <= 1'b1;
              st       <= ESTABLISHED;
            end
          end
          ESTABLISHED: begin
            if (seg.flags[TCP_RST]) begin
              st <= CLOSED;
            end else if (seg.seq == rcv_nxt) begin
              rcv_nxt <= rcv_nxt + 32'(seg.pay_len) + 32'(seg.flags[TCP_FIN]);
              if (seg.pay_len > 16'(POS_BYTES)) begin
                accept     <= 1'b1;
                accept_pos <= seg.pos;
              end
              tx_req <= 1'b1;
              if (seg.flags[TCP_FIN]) begin
                tx_flags       <= F_FINACK;
                close_after_tx <= 1'b1;
              end else begin
                tx_flags <= F_ACK;
              end
            end else begin
              tx_flags <= F_ACK;
              tx_req   <= 1'b1;
              dup_acks <= dup_acks + 16'd1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // A new packet is never queued over one the NIC driver is still sending.
  assert property (@(posedge clk) disable iff (rst) tx_req && !tx_done |=> tx_req)
    else $error("tcp_conn: tx_req dropped before tx_done");

endmodule
