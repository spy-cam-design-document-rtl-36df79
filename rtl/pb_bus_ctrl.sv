// pb_bus_ctrl: controller of the board's shared peripheral bus.
//
// The SRAM (256K x 16) and the AX88796 Ethernet controller hang on one
// 20-bit address bus PB_A and one 16-bit data bus PB_D, selected by RAM_CE_N
// and ETHERNET_CS_N, with the common strobes PB_OE_N, PB_WE_N, PB_LB_N and
// PB_UB_N. This block lets NM masters share that bus: a round-robin arbiter
// picks one pending request, and a small state machine runs one asynchronous
// read or write cycle for it.
//
// Cycle: ACCESS holds the chip select and OE_N (read) or WE_N (write) low for
// SRAM_WAIT (SRAM) or ETH_WAIT (Ethernet) clock cycles, and for an Ethernet
// access also until ETHERNET_RDY is high; read data is captured on the last
// ACCESS cycle. END then releases the strobes while address and write data
// are still driven (write data is latched on the rising WE_N edge), and
// pulses the master's `done`. A bus cycle is thus SRAM_WAIT+1 or ETH_WAIT+1
// (+ RDY wait) clocks plus one idle clock for arbitration.
//
// Interface: master i holds req[i] (struct with `req`) stable until
// rsp[i].done, and may change it in the clock after. The data bus is
// brought out as separate in/out/enable signals; the pad tristate is outside.
// The SRAM takes the word address on PB_A[17:0]; the Ethernet controller its
// register offset on PB_A[4:0]. The pin set follows the design; the
// arbitration policy, wait counts and address mapping are this design's.
module pb_bus_ctrl
  import spycam_pkg::*;
#(
  parameter int unsigned NM        = 2,
  parameter int unsigned SRAM_WAIT = 1,
  parameter int unsigned ETH_WAIT  = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  bus_req_t    req [NM],
  output bus_rsp_t    rsp [NM],
  output logic [19:0] pb_a,
  output logic [15:0] pb_d_o,
  output logic        pb_d_oe,
  input  logic [15:0] pb_d_i,
  output logic        pb_lb_n,
  output logic        pb_ub_n,
  output logic        pb_we_n,
  output logic        pb_oe_n,
  output logic        ram_ce_n,
  output logic        eth_cs_n,
  input  logic        eth_rdy
);
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned CW = 8;

  typedef enum logic [1:0] {IDLE, ACCESS, FIN} bus_state_e;

  bus_state_e     st;
  logic [MW-1:0]  cur, last;
  bus_req_t       op;
  logic [CW-1:0]  cnt;
  logic [15:0]    rdata_q;

  // round-robin choice: first requester after the last one served
  logic          any_req;
  logic [MW-1:0] pick;
  always_comb begin
    any_req = 1'b0;
    pick    = last;
    for (int k = NM; k >= 1; k--) begin
      int unsigned m;
      m = (int'(last) + k) % NM;
      if (req[m].req) begin
        any_req = 1'b1;
        pick    = MW'(m);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st      <= IDLE;
      cur     <= '0;
      last    <= MW'(NM - 1);
      op      <= '0;
      cnt     <= '0;
      rdata_q <= '0;
    end else begin
      unique case (st)
        IDLE: if (any_req) begin
          cur  <= pick;
          last <= pick;
          op   <= req[pick];
          cnt  <= CW'(req[pick].eth ? ETH_WAIT : SRAM_WAIT);
          st   <= ACCESS;
        end
        ACCESS: begin
          if (cnt > CW'(1)) begin
            cnt <= cnt - CW'(1);
          end else if (!op.eth || eth_rdy) begin
            rdata_q <= pb_d_i;
            st      <= FIN;
          end
        end
        FIN: st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    pb_a     = op.addr;
    pb_d_o   = op.wdata;
    pb_d_oe  = (st != IDLE) && op.we;
    pb_lb_n  = !((st == ACCESS) && (op.eth || op.be[0]));
    pb_ub_n  = !((st == ACCESS) && (op.eth || op.be[1]));
    pb_oe_n  = !((st == ACCESS) && !op.we);
    pb_we_n  = !((st == ACCESS) && op.we);
    ram_ce_n = !((st == ACCESS) && !op.eth);
    eth_cs_n = !((st == ACCESS) && op.eth);
    for (int m = 0; m < NM; m++) begin
      rsp[m].done  = (st == FIN) && (int'(cur) == m);
      rsp[m].rdata = rdata_q;
    end
  end

  // never select both devices at once
  assert property (@(posedge clk) disable iff (rst) !(!ram_ce_n && !eth_cs_n))
    else $error("pb_bus_ctrl: both chip selects active");

endmodule
