// ax88796_model: behavioural model of the AX88796 Ethernet controller's host
// side, enough for the testbenches: the NE2000-style page 0/1 registers the
// driver uses, 16 KB of buffer memory (pages 0x40..0x7F), remote DMA through
// the 16-bit data port with wrap from PSTOP to PSTART, the receive ring
// (4-byte header: status, next page, byte count of frame + CRC), transmit
// of a frame from TPSR/TBCR, ISR/IMR and the interrupt line.
// Frames from the network are injected with `inject`; sent frames are queued
// in `tx_q`. Register accesses take effect when the strobe is released.
// State shared with `inject` is updated with blocking assignments.
// RDY is held low for 0..2 clocks at the start of each access, and a
// transmission keeps the TXP bit set for TX_CYCLES clocks.
module ax88796_model
  import tb_net_pkg::*;
#(
  parameter int unsigned TX_CYCLES = 3000
) (
  input  logic        clk,
  input  logic        cs_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic [4:0]  a,
  input  logic [15:0] d_i,
  output logic [15:0] d_o,
  output logic        rdy,
  output logic        ireq
);
  logic [7:0]  mem [16384];
  logic [7:0]  cr, pstart, pstop, bnry, tpsr, isr, imr, curr;
  logic [15:0] tbcr, rsar, rbcr;
  logic [7:0]  par [6];
  logic        wr_act, rd_act, cs_q;
  int          rdy_wait, tx_busy;
  int          rx_frames, rx_dropped, tx_frames, dma_reads, dma_writes;
  bytes_t      tx_q[$];

  initial begin
    for (int i = 0; i < 16384; i++) mem[i] = 8'h00;
    cr = 8'h21; pstart = 8'h46; pstop = 8'h80; bnry = 8'h46; tpsr = 8'h40;
    isr = 8'h00; imr = 8'h00; curr = 8'h47; tbcr = 0; rsar = 0; rbcr = 0;
    for (int i = 0; i < 6; i++) par[i] = 8'h00;
    wr_act = 0; rd_act = 0; cs_q = 1; rdy_wait = 0; tx_busy = 0;
    rx_frames = 0; rx_dropped = 0; tx_frames = 0; dma_reads = 0; dma_writes = 0;
  end

  function automatic logic [7:0] rd8(logic [15:0] addr);
    return (addr >= 16'h4000 && addr < 16'h8000) ? mem[addr - 16'h4000] : 8'hFF;
  endfunction

  function automatic logic [15:0] adv(logic [15:0] addr);
    logic [15:0] n;
    n = addr + 16'd1;
    if (n[15:8] == pstop) n = {pstart, 8'h00};
    return n;
  endfunction

  assign ireq = |(isr & imr);
  assign rdy  = (rdy_wait == 0);

  always_comb begin
    d_o = 16'h0000;
    if (!cs_n && !oe_n) begin
      if (a == 5'h10) d_o = {rd8(adv(rsar)), rd8(rsar)};
      else if (cr[7:6] == 2'b01) begin
        if (a == 5'h07) d_o = {8'h00, curr};
        else if (a >= 5'h01 && a <= 5'h06) d_o = {8'h00, par[a-1]};
      end else begin
        unique case (a)
          5'h00: d_o = {8'h00, cr};
          5'h03: d_o = {8'h00, bnry};
          5'h07: d_o = {8'h00, isr};
          default: d_o = 16'h0000;
        endcase
      end
    end
  end

  always @(posedge clk) begin
    // RDY: a new access waits a few clocks
    if (!cs_n && cs_q) rdy_wait <= $urandom_range(0, 2);
    else if (rdy_wait > 0) rdy_wait <= rdy_wait - 1;
    cs_q <= cs_n;

    if (tx_busy > 0) begin
      tx_busy = tx_busy - 1;
      if (tx_busy == 1) begin
        cr[2] = 1'b0;
        isr   = isr | 8'h02;
      end
    end

    wr_act <= !cs_n && !we_n;
    rd_act <= !cs_n && !oe_n;

    if (rd_act && oe_n && a == 5'h10) begin
      rsar = adv(adv(rsar));
      dma_reads = dma_reads + 1;
      if (rbcr <= 16'd2) begin
        rbcr = 0;
        isr  = isr | 8'h40;
      end else rbcr = rbcr - 16'd2;
    end

    if (wr_act && we_n) begin
      if (a == 5'h10) begin
        if (rsar >= 16'h4000 && rsar < 16'h8000) begin
          mem[rsar - 16'h4000] = d_i[7:0];
          mem[adv(rsar) - 16'h4000] = d_i[15:8];
        end
        rsar = adv(adv(rsar));
        dma_writes = dma_writes + 1;
      end else if (a == 5'h00) begin
        logic start_tx;
        start_tx = d_i[2] && !cr[2] && d_i[1];
        cr = {d_i[7:3], cr[2] | d_i[2], d_i[1:0]};
        if (start_tx) begin
          bytes_t f;
          f.delete();
          for (int i = 0; i < int'(tbcr); i++) f.push_back(rd8({tpsr, 8'h00} + 16'(i)));
          tx_q.push_back(f);
          tx_frames = tx_frames + 1;
          tx_busy   = TX_CYCLES;
        end
      end else if (cr[7:6] == 2'b01) begin
        if (a == 5'h07) curr = d_i[7:0];
        else if (a >= 5'h01 && a <= 5'h06) par[a-1] = d_i[7:0];
      end else begin
        unique case (a)
          5'h01: pstart = d_i[7:0];
          5'h02: pstop  = d_i[7:0];
          5'h03: bnry   = d_i[7:0];
          5'h04: tpsr   = d_i[7:0];
          5'h05: tbcr[7:0]  = d_i[7:0];
          5'h06: tbcr[15:8] = d_i[7:0];
          5'h07: isr    = isr & ~d_i[7:0];
          5'h08: rsar[7:0]  = d_i[7:0];
          5'h09: rsar[15:8] = d_i[7:0];
          5'h0A: rbcr[7:0]  = d_i[7:0];
          5'h0B: rbcr[15:8] = d_i[7:0];
          5'h0F: imr    = d_i[7:0];
          default: ;
        endcase
      end
    end
  end

  // A frame arrives from the network: store it in the receive ring.
  task automatic inject(bytes_t f);
    int len, need, n, free;
    logic [15:0] p;
    logic [7:0] nxt;
    @(negedge clk);
    len  = f.size() + 4;
    need = (len + 4 + 255) / 256;
    n    = int'(pstop) - int'(pstart);
    free = (int'(bnry) - int'(curr) + n) % n;
    if (!cr[1] || cr[0] || need > free) begin
      rx_dropped++;
      return;
    end
    nxt = 8'(int'(pstart) + (int'(curr) - int'(pstart) + need) % n);
    p = {curr, 8'h00};
    mem[p - 16'h4000] = 8'h01;            p = adv(p);
    mem[p - 16'h4000] = nxt;              p = adv(p);
    mem[p - 16'h4000] = 8'(len);          p = adv(p);
    mem[p - 16'h4000] = 8'(len >> 8);     p = adv(p);
    for (int i = 0; i < len; i++) begin
      mem[p - 16'h4000] = (i < f.size()) ? f[i] : 8'h00;
      p = adv(p);
    end
    curr = nxt;
    isr  = isr | 8'h01;
    rx_frames++;
  endtask

endmodule
