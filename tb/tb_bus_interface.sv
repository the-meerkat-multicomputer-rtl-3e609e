// tb_bus_interface: checks one node's bus interface against a scripted bus.
// The testbench plays the arbiters of both buses, the other nodes on the
// buses and the DMA engine. It checks the five commands on each tap, the
// status bits they set and clear, the cycle timing of arbitration and of
// packet words, the receiver path, the 2-bus handshake from both ends
// (owner and cross point) including its timeout, and refusal of illegal
// commands.
module tb_bus_interface;
  import meerkat_pkg::*;
  localparam int B = 8, AW = 12;
  logic clk = 0, rst_n = 0;
  logic [1:0][2:0] my_pos;
  logic cmd_valid;
  cmd_t cmd;
  logic [AW-1:0] cmd_addr;
  tap_status_t [1:0] status;
  logic cmd_err;
  bus_fwd_t [1:0] fwd_in, fwd_out;
  logic [1:0] ack_in, ack_out, arb_req, arb_rel, arb_gnt, arb_fail;
  logic dma_send_start, dma_recv_start, dma_clear;
  logic [AW-1:0] dma_addr;
  logic [CNT_W-1:0] dma_count;
  logic dma_sending, dma_receiving, dma_tx_valid, dma_tx_last;
  logic [31:0] dma_tx_data, dma_rx_data;
  logic dma_rx_valid, dma_rx_last;
  logic [1:0] grant_ok;
  int checks = 0, failures = 0;

  bus_interface #(.B(B), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  // Arbiter model: answers a request one cycle later.
  always_ff @(posedge clk) begin
    arb_gnt  <= arb_req & grant_ok;
    arb_fail <= arb_req & ~grant_ok;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL [%0t]: %s", $time, what); end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic issue(input op_e op, input tap_e tap, input logic two = 0,
                       input int pos = 0, input int count = 0);
    cmd = '0; cmd.op = op; cmd.tap = tap; cmd.two_bus = two;
    cmd.pos = 8'(pos); cmd.count = CNT_W'(count);
    cmd_valid = 1;
    tick();
    cmd_valid = 0;
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    my_pos[TAP_H] = 3'd2; my_pos[TAP_V] = 3'd5;
    cmd_valid = 0; cmd = '0; cmd_addr = 12'h100;
    fwd_in = '{default: BUS_IDLE}; ack_in = 0; grant_ok = 2'b11;
    dma_sending = 0; dma_receiving = 0; dma_tx_valid = 0; dma_tx_last = 0; dma_tx_data = 0;
    tick(2); rst_n = 1; tick();

    // ---- 1-bus connection as sender on H ----
    issue(OP_ARB, TAP_H);
    check(arb_req == 2'b01, "arbitration request on H");
    n = 1;
    while (!status[TAP_H].owned && n < 10) begin tick(); n++; end
    check(status[TAP_H].owned && n == 4, "H owned four cycles after arbitrate");
    issue(OP_SIGNAL, TAP_H, 0, 6);
    check(fwd_out[TAP_H].typ == BT_SIGNAL && fwd_out[TAP_H].data == 32'd6, "signal word on H");
    check(status[TAP_H].sig_sent && !status[TAP_H].rx_ready, "sig_sent set");
    tick(3);
    ack_in[TAP_H] = 1; tick(); tick();
    check(status[TAP_H].rx_ready && !status[TAP_H].sig_sent, "receiver ready seen");
    cmd_addr = 12'h040;
    cmd = '0; cmd.op = OP_SEND; cmd.tap = TAP_H; cmd.count = 11'd3; cmd_valid = 1; #1;
    check(dma_send_start && dma_count == 3 && dma_addr == 12'h040, "DMA send started");
    tick(); cmd_valid = 0;
    dma_sending = 1;
    for (int i = 0; i < 3; i++) begin
      dma_tx_valid = 1; dma_tx_data = 32'hA000 + 32'(i); dma_tx_last = (i == 2);
      tick();
      check(fwd_out[TAP_H].data == 32'hA000 + 32'(i) &&
            fwd_out[TAP_H].typ == ((i == 2) ? BT_LAST : BT_DATA), "packet word on H");
    end
    dma_tx_valid = 0; dma_sending = 0; ack_in = 0;
    tick();
    check(fwd_out[TAP_H] == BUS_IDLE, "bus idle after packet");
    issue(OP_RELEASE, TAP_H);
    check(fwd_out[TAP_H] == BUS_IDLE, "no release word on a 1-bus connection");
    tick();
    check(arb_rel == 2'b01, "release pulse on H");
    tick();
    check(!status[TAP_H].owned && arb_rel == 0, "H released");

    // ---- failed arbitration ----
    grant_ok = 2'b00;
    issue(OP_ARB, TAP_V);
    tick(3);
    check(status[TAP_V].arb_fail && !status[TAP_V].owned, "arbitration failure reported");
    grant_ok = 2'b11;

    // ---- illegal command ----
    issue(OP_SEND, TAP_V, 0, 0, 4);
    check(cmd_err && !dma_send_start, "send without connection refused");

    // ---- receiver on V ----
    fwd_in[TAP_V] = '{typ: BT_SIGNAL, data: 32'h105}; tick();   // still on first bus
    fwd_in[TAP_V] = '{typ: BT_SIGNAL, data: 32'd4};   tick();   // someone else
    fwd_in[TAP_V] = BUS_IDLE; tick();
    check(!status[TAP_V].sig_pending, "signals for others ignored");
    fwd_in[TAP_V] = '{typ: BT_SIGNAL, data: 32'd5}; tick();
    fwd_in[TAP_V] = BUS_IDLE;
    check(status[TAP_V].sig_pending, "signalled on V");
    cmd_addr = 12'h200;
    cmd = '0; cmd.op = OP_RECV; cmd.tap = TAP_V; cmd_valid = 1; #1;
    check(dma_recv_start && dma_addr == 12'h200, "DMA receive started");
    tick(); cmd_valid = 0; dma_receiving = 1;
    check(!status[TAP_V].sig_pending && status[TAP_V].receptive, "receptive");
    tick();
    check(ack_out[TAP_V], "acknowledge driven while receptive");
    for (int i = 0; i < 5; i++) begin
      fwd_in[TAP_V] = '{typ: (i == 4) ? BT_LAST : BT_DATA, data: 32'hB00 + 32'(i)}; #1;
      check(dma_rx_valid && dma_rx_data == 32'hB00 + 32'(i) && dma_rx_last == (i == 4),
            "received word passed to DMA");
      tick();
    end
    fwd_in[TAP_V] = BUS_IDLE; dma_receiving = 0; #1;
    check(!dma_rx_valid && !status[TAP_V].receptive && !ack_out[TAP_V], "receive ends on last word");

    // ---- acting as cross point: XREQ on H, forward to V ----
    fwd_in[TAP_H] = '{typ: BT_XREQ, data: 32'd2}; tick();
    fwd_in[TAP_H] = BUS_IDLE;
    check(arb_req == 2'b10, "cross point arbitrates for V");
    tick(); tick();
    check(ack_out[TAP_H] && status[TAP_H].xpoint, "cross point acknowledges");
    issue(OP_ARB, TAP_V);
    check(status[TAP_V].arb_fail, "own arbitration refused while cross point");
    fwd_in[TAP_H] = '{typ: BT_SIGNAL, data: 32'h107}; tick();
    fwd_in[TAP_H] = '{typ: BT_DATA, data: 32'hCAFE}; #1;
    check(fwd_out[TAP_V].typ == BT_SIGNAL && fwd_out[TAP_V].data == 32'h007,
          "signal forwarded with first-bus flag cleared");
    ack_in[TAP_V] = 1; tick();
    check(fwd_out[TAP_V].typ == BT_DATA && fwd_out[TAP_V].data == 32'hCAFE, "data forwarded");
    fwd_in[TAP_H] = '{typ: BT_RELEASE, data: 0}; #1;
    check(ack_out[TAP_H], "acknowledge forwarded back");
    tick(); fwd_in[TAP_H] = BUS_IDLE; ack_in = 0;
    check(fwd_out[TAP_V].typ == BT_RELEASE && arb_rel == 2'b10, "release forwarded, V freed");
    tick();
    check(!status[TAP_H].xpoint, "cross point ended");

    // ---- 2-bus connection as owner on V ----
    issue(OP_ARB, TAP_V, 1, 3);
    tick(3);
    check(fwd_out[TAP_V].typ == BT_XREQ && fwd_out[TAP_V].data == 32'd3, "XREQ names cross point");
    tick(2); ack_in[TAP_V] = 1; tick(); ack_in[TAP_V] = 0; tick();
    check(status[TAP_V].owned && status[TAP_V].two_bus && !status[TAP_V].arb_fail, "2-bus up");
    issue(OP_SIGNAL, TAP_V, 0, 1);
    check(fwd_out[TAP_V].typ == BT_SIGNAL && fwd_out[TAP_V].data == 32'h101, "signal marked for second bus");
    issue(OP_RELEASE, TAP_V);
    check(fwd_out[TAP_V].typ == BT_RELEASE, "release word sent");
    tick();
    check(arb_rel == 2'b10, "V released");
    tick();

    // ---- 2-bus attempt that times out ----
    issue(OP_ARB, TAP_H, 1, 7);
    tick(14);
    check(status[TAP_H].arb_fail && !status[TAP_H].owned, "2-bus timeout reported");
    issue(OP_SIGNAL, TAP_H, 0, 1);
    check(cmd_err, "no signal over a held first bus");
    issue(OP_RELEASE, TAP_H);
    tick();
    check(arb_rel == 2'b01, "first bus released after failed 2-bus attempt");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
