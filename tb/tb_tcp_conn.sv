// tb_tcp_conn: checks the TCP connection logic.
// Walks it through connect (SYN), a SYN+ACK with a wrong acknowledgement
// (ignored), the right SYN+ACK (ACK, established), in-order video segments
// (ACK with advanced acknowledgement number, `accept`), a repeated segment
// (duplicate ACK, no accept), a segment with a bad checksum (ignored), FIN
// (FIN+ACK, closed) and RST. Sequence numbers are checked against values
// the testbench tracks itself: each sent packet carries one positioning byte.
module tb_tcp_conn;
  import spycam_pkg::*;

  logic clk = 0, rst = 1, connect = 0, seg_valid = 0, tx_done = 0;
  logic [31:0] iss = 32'hFFFF_FFFE;
  rx_seg_t seg;
  logic tx_req, accept;
  logic [5:0] tx_flags;
  logic [31:0] tx_seq, tx_ack;
  logic [7:0] accept_pos;
  logic [1:0] state;
  logic [15:0] dup_acks;
  int checks = 0, failures = 0;
  int accepts = 0;

  tcp_conn dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (accept) accepts++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic send(bit ok, logic [5:0] fl, logic [31:0] sq, logic [31:0] ak, int plen, int pos);
    @(negedge clk);
    seg = '0;
    seg.ok = ok; seg.flags = fl; seg.seq = sq; seg.ack = ak;
    seg.pay_len = 16'(plen); seg.pos = 8'(pos);
    seg_valid = 1;
    @(negedge clk) seg_valid = 0;
  endtask

  // take the queued packet and check it
  task automatic take(string what, logic [5:0] fl, logic [31:0] sq, logic [31:0] ak);
    @(negedge clk);
    chk({what, " tx_req"}, tx_req === 1'b1);
    chk({what, " flags"}, tx_flags == fl);
    chk({what, " seq"}, tx_seq == sq);
    if (fl[TCP_ACK]) chk({what, " ack"}, tx_ack == ak);
    if (tx_seq != sq || tx_ack != ak)
      $display("  %s: seq %h/%h ack %h/%h", what, tx_seq, sq, tx_ack, ak);
    repeat ($urandom_range(0, 5)) @(negedge clk);
    tx_done = 1;
    @(negedge clk) tx_done = 0;
    chk({what, " req drops"}, tx_req === 1'b0);
  endtask

  initial begin
    logic [31:0] cam = 32'h1000_0000, mine;
    seg = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk("closed", state == 2'd0 && !tx_req);
    connect = 1; @(negedge clk) connect = 0;
    chk("syn_sent", state == 2'd1);
    take("SYN", 6'b000010, iss, 0);
    mine = iss + 2;                                  // SYN + positioning byte
    send(1, 6'b010010, cam, mine + 5, 0, 0);         // wrong ack: ignored
    @(negedge clk);
    chk("wrong synack ignored", state == 2'd1 && !tx_req);
    send(1, 6'b010010, cam, mine, 0, 0);
    cam = cam + 1;
    chk("established", state == 2'd2);
    take("ACK of SYN", 6'b010000, mine, cam);
    mine = mine + 1;
    for (int p = 0; p < 5; p++) begin
      send(1, 6'b011000, cam, mine, 513, p);
      chk("accept pulse", accept === 1'b1 && accepts == p && accept_pos == 8'(p));
      cam = cam + 513;
      take("ACK of data", 6'b010000, mine, cam);
      mine = mine + 1;
    end
    // repeated segment: duplicate ack, no accept
    send(1, 6'b011000, cam - 513, mine, 513, 4);
    take("dup ACK", 6'b010000, mine, cam);
    mine = mine + 1;
    chk("dup counted", dup_acks == 16'd1 && accepts == 5);
    // bad segment ignored
    send(0, 6'b011000, cam, mine, 513, 5);
    @(negedge clk);
    chk("bad seg ignored", !tx_req && accepts == 5);
    // FIN
    send(1, 6'b010001, cam, mine, 0, 0);
    cam = cam + 1;
    take("FIN+ACK", 6'b010001, mine, cam);
    chk("closed after fin", state == 2'd0);
    // reconnect, then RST
    connect = 1; @(negedge clk) connect = 0;
    take("SYN again", 6'b000010, iss, 0);
    send(1, 6'b000100, 0, 0, 0, 0);
    chk("rst closes", state == 2'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
