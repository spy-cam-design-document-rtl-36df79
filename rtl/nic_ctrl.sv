// nic_ctrl: driver of the AX88796 Ethernet controller.
//
// A sequencer that runs fixed lists of register accesses ("steps") on the
// shared bus, in phases:
//   INIT   stop the NIC, set word-wide DMA, the receive ring (pages 0x46 to
//          0x80), the transmit page (0x40), interrupt mask, station address
//          and CURR, then write 0x22 to the command register to start it.
//   POLL   when ETHERNET_IREQ is high, or every POLL_CYCLES clocks: clear the
//          packet-received flag, read CURR (page 1) and compare it with the
//          page of the next unread packet.
//   RXHDR  remote DMA read (command 0x0A) of the 4-byte ring header:
//          status, next-packet page, byte count.
//   RXPKT  remote DMA read of the frame, one 16-bit word per bus access.
//          Each word's two bytes go to the packet parser; every second pixel
//          byte the parser returns completes an SRAM word, which is written
//          to the frame store before the next NIC read. Then 0x22 ends the
//          DMA and BNRY is moved up to free the ring pages.
//   TXCHK  wait until the command register's TXP bit is clear.
//   TX     remote DMA write (command 0x12) of the 60-byte frame built by
//          ip_tcp_tx into the transmit page, then TPSR/TBCR and command 0x26
//          to send it.
// A packet queued by the TCP logic is sent before the ring is polled again.
//
// Interface: bus master port `breq`/`brsp`; parser feed `rx_sop`,
// `rx_valid`/`rx_byte`, `rx_eop` and the parser's pixel output `pay_*`;
// transmit request `tx_req`, `tx_load` (latch the packet fields), word read
// port `tx_widx`/`tx_wdata`, and `tx_done`. Pixel byte `off` of segment `pos`
// lands at SRAM byte FRAME_BASE*2 + pos*512 + off; bytes past FRAME_BYTES
// are dropped. The command codes 0x22, 0x0A, 0x12 and 0x26 follow the design;
// the other register values, the ring layout and the polling are this
// design's, using the NIC's NE2000-compatible register set.
module nic_ctrl
  import spycam_pkg::*;
#(
  parameter int unsigned FRAME_BYTES    = 19200,
  parameter logic [19:0] FRAME_BASE     = 20'h00000,
  parameter int unsigned TX_FRAME_BYTES = 60,
  parameter int unsigned POLL_CYCLES    = 4096,
  parameter int unsigned MAX_FRAME      = 1536
) (
  input  logic        clk,
  input  logic        rst,
  input  link_cfg_t   cfg,
  input  logic        eth_ireq,
  output bus_req_t    breq,
  input  bus_rsp_t    brsp,
  // parser feed
  output logic        rx_sop,
  output logic        rx_valid,
  output logic [7:0]  rx_byte,
  output logic        rx_eop,
  input  logic        pay_valid,
  input  logic [7:0]  pay_pos,
  input  logic [15:0] pay_off,
  input  logic [7:0]  pay_byte,
  // transmit
  input  logic        tx_req,
  output logic        tx_load,
  output logic [4:0]  tx_widx,
  input  logic [15:0] tx_wdata,
  output logic        tx_done,
  // status
  output logic        ready,
  output logic [15:0] rx_count,
  output logic [15:0] tx_count,
  output logic [15:0] txp_waits,
  output logic [15:0] ring_wraps
);
  typedef enum logic [2:0] {PH_INIT, PH_IDLE, PH_POLL, PH_RXHDR, PH_RXPKT, PH_TXCHK, PH_TX} phase_e;
  typedef enum logic [2:0] {K_WR, K_RD, K_RDW, K_WRW, K_END} kind_e;
  typedef enum logic [2:0] {S_STEP, S_FEED_LO, S_FEED_HI, S_SRAM, S_SETTLE} sub_e;

  localparam int unsigned TX_WORDS = (TX_FRAME_BYTES + 1) / 2;

  phase_e      ph;
  sub_e        sub;
  logic [4:0]  step;
  logic [15:0] rd_q;            // last word read
  logic [7:0]  next_pkt;        // ring page of the next unread packet
  logic [7:0]  curr_q;
  logic [7:0]  hdr_next;
  logic [15:0] hdr_len;
  logic [15:0] wcnt;            // words moved in a K_RDW/K_WRW step
  logic [15:0] bcnt;            // frame bytes fed to the parser
  logic [15:0] poll_cnt;
  logic [2:0]  settle;

  // pixel pair collector -> SRAM write
  logic [7:0]  pix_lo;
  logic        sram_pend;
  logic [19:0] sram_addr;
  logic [15:0] sram_data;

  // ------------------------------------------------------------ step table
  kind_e      k;
  logic [4:0] k_reg;
  logic [7:0] k_dat;
  logic [15:0] rd_words;
  logic [15:0] len_even;

  assign len_even = (hdr_len > 16'(MAX_FRAME)) ? 16'(MAX_FRAME) : hdr_len + {15'd0, hdr_len[0]};
  assign rd_words = len_even >> 1;

  always_comb begin
    k     = K_END;
    k_reg = REG_CR;
    k_dat = 8'h00;
    unique case (ph)
      PH_INIT: unique case (step)
        5'd0:  begin k = K_WR; k_reg = REG_CR;     k_dat = CR_STOP;       end
        5'd1:  begin k = K_WR; k_reg = REG_DCR;    k_dat = 8'h01;         end
        5'd2:  begin k = K_WR; k_reg = REG_RBCR0;  k_dat = 8'h00;         end
        5'd3:  begin k = K_WR; k_reg = REG_RBCR1;  k_dat = 8'h00;         end
        5'd4:  begin k = K_WR; k_reg = REG_RCR;    k_dat = 8'h00;         end
        5'd5:  begin k = K_WR; k_reg = REG_TCR;    k_dat = 8'h02;         end
        5'd6:  begin k = K_WR; k_reg = REG_PSTART; k_dat = NIC_RX_START;  end
        5'd7:  begin k = K_WR; k_reg = REG_PSTOP;  k_dat = NIC_RX_STOP;   end
        5'd8:  begin k = K_WR; k_reg = REG_BNRY;   k_dat = NIC_RX_START;  end
        5'd9:  begin k = K_WR; k_reg = REG_TPSR;   k_dat = NIC_TX_PAGE;   end
        5'd10: begin k = K_WR; k_reg = REG_ISR;    k_dat = 8'hFF;         end
        5'd11: begin k = K_WR; k_reg = REG_IMR;    k_dat = 8'h01;         end
        5'd12: begin k = K_WR; k_reg = REG_CR;     k_dat = CR_PAGE1_STOP; end
        5'd13, 5'd14, 5'd15, 5'd16, 5'd17, 5'd18: begin
          k     = K_WR;
          k_reg = REG_PAR0 + 5'(step - 5'd13);
          k_dat = cfg.local_mac[47 - 8*(int'(step) - 13) -: 8];
        end
        5'd19: begin k = K_WR; k_reg = REG_CURR;   k_dat = NIC_RX_START + 8'd1; end
        5'd20: begin k = K_WR; k_reg = REG_CR;     k_dat = CR_ACTIVATE;   end
        5'd21: begin k = K_WR; k_reg = REG_TCR;    k_dat = 8'h00;         end
        default: k = K_END;
      endcase
      PH_POLL: unique case (step)
        5'd0: begin k = K_WR; k_reg = REG_ISR;  k_dat = 8'h01;       end
        5'd1: begin k = K_WR; k_reg = REG_CR;   k_dat = CR_PAGE1;    end
        5'd2: begin k = K_RD; k_reg = REG_CURR;                      end
        5'd3: begin k = K_WR; k_reg = REG_CR;   k_dat = CR_ACTIVATE; end
        default: k = K_END;
      endcase
      PH_RXHDR: unique case (step)
        5'd0: begin k = K_WR; k_reg = REG_RSAR0; k_dat = 8'h00;        end
        5'd1: begin k = K_WR; k_reg = REG_RSAR1; k_dat = next_pkt;     end
        5'd2: begin k = K_WR; k_reg = REG_RBCR0; k_dat = 8'd4;         end
        5'd3: begin k = K_WR; k_reg = REG_RBCR1; k_dat = 8'd0;         end
        5'd4: begin k = K_WR; k_reg = REG_CR;    k_dat = CR_RDMA_READ; end
        5'd5: begin k = K_RD; k_reg = REG_DATA;                        end
        5'd6: begin k = K_RD; k_reg = REG_DATA;                        end
        5'd7: begin k = K_WR; k_reg = REG_CR;    k_dat = CR_ACTIVATE;  end
        default: k = K_END;
      endcase
      PH_RXPKT: unique case (step)
        5'd0: begin k = K_WR; k_reg = REG_RSAR0; k_dat = 8'd4;           end
        5'd1: begin k = K_WR; k_reg = REG_RSAR1; k_dat = next_pkt;       end
        5'd2: begin k = K_WR; k_reg = REG_RBCR0; k_dat = len_even[7:0];  end
        5'd3: begin k = K_WR; k_reg = REG_RBCR1; k_dat = len_even[15:8]; end
        5'd4: begin k = K_WR; k_reg = REG_CR;    k_dat = CR_RDMA_READ;   end
        5'd5: begin k = K_RDW; k_reg = REG_DATA;                         end
        5'd6: begin k = K_WR; k_reg = REG_CR;    k_dat = CR_ACTIVATE;    end
        5'd7: begin
          k = K_WR; k_reg = REG_BNRY;
          k_dat = (hdr_next == NIC_RX_START) ? NIC_RX_STOP - 8'd1 : hdr_next - 8'd1;
        end
        default: k = K_END;
      endcase
      PH_TXCHK: unique case (step)
        5'd0: begin k = K_RD; k_reg = REG_CR; end
        default: k = K_END;
      endcase
      PH_TX: unique case (step)
        5'd0:  begin k = K_WR; k_reg = REG_RSAR0; k_dat = 8'h00;                  end
        5'd1:  begin k = K_WR; k_reg = REG_RSAR1; k_dat = NIC_TX_PAGE;            end
        5'd2:  begin k = K_WR; k_reg = REG_RBCR0; k_dat = 8'(2 * TX_WORDS);       end
        5'd3:  begin k = K_WR; k_reg = REG_RBCR1; k_dat = 8'((2 * TX_WORDS) >> 8); end
        5'd4:  begin k = K_WR; k_reg = REG_CR;    k_dat = CR_RDMA_WRITE;          end
        5'd5:  begin k = K_WRW; k_reg = REG_DATA;                                 end
        5'd6:  begin k = K_WR; k_reg = REG_CR;    k_dat = CR_ACTIVATE;            end
        5'd7:  begin k = K_WR; k_reg = REG_TPSR;  k_dat = NIC_TX_PAGE;            end
        5'd8:  begin k = K_WR; k_reg = REG_TBCR0; k_dat = 8'(TX_FRAME_BYTES);     end
        5'd9:  begin k = K_WR; k_reg = REG_TBCR1; k_dat = 8'(TX_FRAME_BYTES >> 8); end
        5'd10: begin k = K_WR; k_reg = REG_CR;    k_dat = CR_TRANSMIT;            end
        default: k = K_END;
      endcase
      default: k = K_END;
    endcase
  end

  // ------------------------------------------------------------ bus request
  always_comb begin
    breq      = '0;
    breq.be   = 2'b11;
    tx_widx   = wcnt[4:0];
    if (sub == S_SRAM) begin
      breq.req   = sram_pend;
      breq.we    = 1'b1;
      breq.eth   = 1'b0;
      breq.addr  = sram_addr;
      breq.wdata = sram_data;
    end else if (sub == S_STEP && ph != PH_IDLE) begin
      breq.eth   = 1'b1;
      breq.addr  = {15'd0, k_reg};
      unique case (k)
        K_WR:  begin breq.req = 1'b1; breq.we = 1'b1; breq.wdata = {8'h00, k_dat}; end
        K_RD:  begin breq.req = 1'b1; breq.we = 1'b0; end
        K_RDW: begin breq.req = (wcnt < rd_words); breq.we = 1'b0; end
        K_WRW: begin breq.req = (wcnt < 16'(TX_WORDS)); breq.we = 1'b1; breq.wdata = tx_wdata; end
        default: ;
      endcase
    end
  end

  // parser feed
  always_comb begin
    rx_valid = 1'b0;
    rx_byte  = 8'h00;
    if (sub == S_FEED_LO) begin
      rx_valid = (bcnt < hdr_len);
      rx_byte  = rd_q[7:0];
    end else if (sub == S_FEED_HI) begin
      rx_valid = (bcnt < hdr_len);
      rx_byte  = rd_q[15:8];
    end
  end

  // pixel pairs from the parser -> SRAM word
  logic [31:0] pix_byte_addr;
  assign pix_byte_addr = 32'(pay_pos) * DATA_BYTES + 32'(pay_off);

  always_ff @(posedge clk) begin
    if (rst) begin
      pix_lo    <= '0;
      sram_pend <= 1'b0;
      sram_addr <= '0;
      sram_data <= '0;
    end else begin
      if (sub == S_SRAM && brsp.done) sram_pend <= 1'b0;
      if (pay_valid) begin
        if (!pay_off[0]) begin
          pix_lo <= pay_byte;
        end else if (pix_byte_addr < 32'(FRAME_BYTES)) begin
          sram_pend <= 1'b1;
          sram_addr <= FRAME_BASE + 20'(pix_byte_addr >> 1);
          sram_data <= {pay_byte, pix_lo};
        end
      end
    end
  end

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk) begin
    rx_sop  <= 1'b0;
    rx_eop  <= 1'b0;
    tx_load <= 1'b0;
    tx_done <= 1'b0;
    if (rst) begin
      ph         <= PH_INIT;
      sub        <= S_STEP;
      step       <= '0;
      rd_q       <= '0;
      next_pkt   <= NIC_RX_START + 8'd1;
      curr_q     <= '0;
      hdr_next   <= '0;
      hdr_len    <= '0;
      wcnt       <= '0;
      bcnt       <= '0;
      poll_cnt   <= '0;
      settle     <= '0;
      ready      <= 1'b0;
      rx_count   <= '0;
      tx_count   <= '0;
      txp_waits  <= '0;
      ring_wraps <= '0;
    end else begin
      poll_cnt <= (poll_cnt == 16'(POLL_CYCLES - 1)) ? poll_cnt : poll_cnt + 16'd1;
      unique case (sub)
        S_SETTLE: begin
          // let the parser and the TCP logic react to the last frame
          settle <= settle - 3'd1;
          if (settle == 3'd1) sub <= S_STEP;
        end
        S_FEED_LO: begin
          if (bcnt < hdr_len) bcnt <= bcnt + 16'd1;
          sub <= S_FEED_HI;
        end
        S_FEED_HI: begin
          if (bcnt < hdr_len) bcnt <= bcnt + 16'd1;
          sub <= S_SRAM;
        end
        S_SRAM: begin
          if (!sram_pend || brsp.done) begin
            wcnt <= wcnt + 16'd1;
            sub  <= S_STEP;
          end
        end
        S_STEP: begin
          if (ph == PH_IDLE) begin
            step <= '0;
            wcnt <= '0;
            if (tx_req) begin
              ph <= PH_TXCHK;
            end else if (eth_ireq || poll_cnt == 16'(POLL_CYCLES - 1)) begin
              ph       <= PH_POLL;
              poll_cnt <= '0;
            end
          end else begin
            unique case (k)
              K_END: begin
                step <= '0;
                wcnt <= '0;
                unique case (ph)
                  PH_INIT:  begin ph <= PH_IDLE; ready <= 1'b1; end
                  PH_POLL:  ph <= (curr_q != next_pkt) ? PH_RXHDR : PH_IDLE;
                  PH_RXHDR: begin
                    ph     <= PH_RXPKT;
                    rx_sop <= 1'b1;
                    bcnt   <= '0;
                  end
                  PH_RXPKT: begin
                    if (hdr_next < next_pkt) ring_wraps <= ring_wraps + 16'd1;
                    next_pkt <= hdr_next;
                    rx_eop   <= 1'b1;
                    rx_count <= rx_count + 16'd1;
                    ph       <= PH_IDLE;
                    sub      <= S_SETTLE;
                    settle   <= 3'd4;
                  end
                  PH_TXCHK: begin
                    ph      <= PH_TX;
                    tx_load <= 1'b1;
                  end
                  PH_TX: begin
                    tx_done  <= 1'b1;
                    tx_count <= tx_count + 16'd1;
                    ph       <= PH_IDLE;
                    sub      <= S_SETTLE;
                    settle   <= 3'd2;
                  end
                  default: ph <= PH_IDLE;
                endcase
              end
              K_WR, K_RD: if (brsp.done) begin
                rd_q <= brsp.rdata;
                step <= step + 5'd1;
                if (ph == PH_POLL && step == 5'd2) curr_q <= brsp.rdata[7:0];
                if (ph == PH_RXHDR && step == 5'd5) hdr_next <= brsp.rdata[15:8];
                if (ph == PH_RXHDR && step == 5'd6) hdr_len  <= brsp.rdata;
                if (ph == PH_TXCHK && brsp.rdata[CR_TXP_BIT]) begin
                  step      <= step;      // still transmitting: read again
                  txp_waits <= txp_waits + 16'd1;
                end
              end
              K_RDW: begin
                if (wcnt >= rd_words) begin
                  step <= step + 5'd1;
                  wcnt <= '0;
                end else if (brsp.done) begin
                  rd_q <= brsp.rdata;
                  sub  <= S_FEED_LO;
                end
              end
              K_WRW: begin
                if (wcnt >= 16'(TX_WORDS)) begin
                  step <= step + 5'd1;
                  wcnt <= '0;
                end else if (brsp.done) begin
                  wcnt <= wcnt + 16'd1;
                end
              end
              default: ;
            endcase
          end
        end
        default: sub <= S_STEP;
      endcase
    end
  end

endmodule
