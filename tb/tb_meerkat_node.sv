// tb_meerkat_node: one node on two small buses, driven through its
// register port. The testbench plays the other taps of both buses.
// Checks the register map (address, command read-back, cycle counter,
// interrupt masks, skew table), the skew setting following the bus master,
// a packet sent from node memory onto the horizontal bus at one word per
// clock, a packet received from the vertical bus into node memory with the
// signal interrupt and its masking, and S-Bus interrupt routing.
module tb_meerkat_node;
  import meerkat_pkg::*;
  localparam int B = 4, AW = 10, ROW = 1, COL = 2;
  logic clk = 0, rst_n = 0;
  logic reg_req, reg_we, reg_rvalid;
  logic [3:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [3:0] irq;
  logic [1:0] ext_irq;
  logic mem_req, mem_we;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  bus_fwd_t [1:0] fwd_in, fwd_out;
  logic [1:0] ack_in, ack_out, arb_req, arb_rel, arb_gnt, arb_fail, owner_valid;
  logic [1:0][1:0] owner;
  logic [1:0][DELAY_W-1:0] delay_sel;
  logic [1:0] delay_adjusting;
  int checks = 0, failures = 0;

  // the two buses; the node is tap COL on H and tap ROW on V
  bus_fwd_t [1:0][B-1:0] drv;
  logic [1:0][B-1:0] ackd, req, rel, gnt, fl;
  logic [1:0][B-1:0] tb_req, tb_rel, tb_ack;
  bus_fwd_t [1:0][B-1:0] tb_drv;
  localparam int MYTAP [2] = '{COL, ROW};

  for (genvar t = 0; t < 2; t++) begin : g_bus
    always_comb begin
      drv[t] = tb_drv[t]; ackd[t] = tb_ack[t]; req[t] = tb_req[t]; rel[t] = tb_rel[t];
      drv[t][MYTAP[t]]  = fwd_out[t];
      ackd[t][MYTAP[t]] = ack_out[t];
      req[t][MYTAP[t]]  = arb_req[t];
      rel[t][MYTAP[t]]  = arb_rel[t];
    end
    internode_bus #(.B(B)) u_bus (
      .clk, .rst_n, .fwd_drv (drv[t]), .ack_drv (ackd[t]), .arb_req (req[t]), .arb_rel (rel[t]),
      .fwd (fwd_in[t]), .ack (ack_in[t]), .arb_gnt (gnt[t]), .arb_fail (fl[t]),
      .owner_valid (owner_valid[t]), .owner (owner[t]));
    assign arb_gnt[t]  = gnt[t][MYTAP[t]];
    assign arb_fail[t] = fl[t][MYTAP[t]];
  end

  meerkat_node #(.B(B), .AW(AW)) dut (
    .clk, .rst_n, .row (2'(ROW)), .col (2'(COL)),
    .reg_req, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .reg_rvalid, .irq, .ext_irq,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .fwd_in, .ack_in, .fwd_out, .ack_out, .arb_req, .arb_rel, .arb_gnt, .arb_fail,
    .owner_valid, .owner, .delay_sel, .delay_adjusting);

  always #5 clk = ~clk;

  logic [31:0] mem [1 << AW];
  always_ff @(posedge clk) begin
    if (mem_req && mem_we)  mem[mem_addr] <= mem_wdata;
    if (mem_req && !mem_we) mem_rdata <= mem[mem_addr];
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL [%0t]: %s", $time, what); end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    reg_req = 1; reg_we = 1; reg_addr = a; reg_wdata = d; tick(); reg_req = 0; reg_we = 0;
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    reg_req = 1; reg_we = 0; reg_addr = a; tick(); reg_req = 0;
    check(reg_rvalid, "read data valid one cycle later");
    d = reg_rdata;
  endtask

  function automatic logic [31:0] cmdw(input op_e op, input tap_e tap, input int pos = 0,
                                       input int count = 0);
    cmd_t c;
    c = '0; c.op = op; c.tap = tap; c.pos = 8'(pos); c.count = CNT_W'(count);
    return 32'(c);
  endfunction

  function automatic tap_status_t ts(input logic [31:0] d);
    return tap_status_t'(d[9:0]);
  endfunction

  function automatic dma_status_t ds(input logic [31:0] d);
    return dma_status_t'(d[14:0]);
  endfunction

  // testbench tap (bus t, tap p) takes the bus
  task automatic tb_own(input int t, input int p);
    tb_req[t][p] = 1; tick(); tb_req[t][p] = 0;
    check(gnt[t][p], "testbench tap granted");
    tick();
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d, c0, c1;
    int first, got;
    reg_req = 0; reg_we = 0; reg_addr = 0; reg_wdata = 0; ext_irq = 0;
    tb_req = '0; tb_rel = '0; tb_ack = '0; tb_drv = '{default: BUS_IDLE};
    for (int a = 0; a < (1 << AW); a++) mem[a] = 32'h5000_0000 + 32'(a * 3);
    tick(2); rst_n = 1; tick();

    // registers
    wr(REG_ADDR, 32'h123); rd(REG_ADDR, d); check(d == 32'h123, "ADDR register");
    rd(REG_CYCLE, c0); tick(9); rd(REG_CYCLE, c1);
    check(c1 - c0 == 10, "cycle counter counts clocks");
    wr(REG_IRQ_EN, {14'b0, 2'd2, 10'b0, 6'b10_0000});
    rd(REG_IRQ_EN, d); check(d == 32'h0020_0000, "IRQ_EN of cpu 2");
    ext_irq = 2'b10; tick(2);
    check(irq == 4'b0100, "S-Bus interrupt reaches the enabled cpu only");
    ext_irq = 0; wr(REG_IRQ_EN, {14'b0, 2'd2, 16'b0});
    for (int t = 0; t < 2; t++)
      for (int p = 0; p < B; p++) wr(REG_SKEW, {15'b0, 1'(t), 8'(p), 2'b0, 6'(10 * t + p + 1)});
    wr(REG_SKEW, {15'b0, 1'b1, 8'd3, 8'd0}); wr(REG_SKEW, {15'b0, 1'b1, 8'd3, 8'd14});
    rd(REG_SKEW, d); check(d == 14, "skew table read-back");

    // skew follows master: testbench tap 3 owns the H bus
    tb_own(0, 3); tick();
    check(delay_sel[0] == 6'd4, "H delay set for master 3");
    tb_rel[0][3] = 1; tick(); tb_rel = '0; tick();

    // send 8 words from memory 0x40 onto H, receiver is tap 0
    wr(REG_CMD, cmdw(OP_ARB, TAP_H)); tick(4);
    rd(REG_STAT_H, d); check(ts(d).owned, "node owns H bus");
    check(delay_sel[0] == 6'd3, "H delay set for this node as master");
    wr(REG_CMD, cmdw(OP_SIGNAL, TAP_H, 0));
    tb_ack[0][0] = 1; tick(3);
    rd(REG_STAT_H, d); check(ts(d).rx_ready, "rx_ready");
    wr(REG_ADDR, 32'h40);
    reg_req = 1; reg_we = 1; reg_addr = REG_CMD; reg_wdata = cmdw(OP_SEND, TAP_H, 0, 8);
    tick(); reg_req = 0; reg_we = 0;
    first = -1; got = 0;
    for (int cy = 1; cy < 20; cy++) begin
      if (fwd_in[0].typ == BT_DATA || fwd_in[0].typ == BT_LAST) begin
        if (first < 0) first = cy;
        check(fwd_in[0].data == 32'h5000_0000 + 32'((32'h40 + got) * 3), "word on bus");
        check(cy == first + got, "one word per clock");
        check((fwd_in[0].typ == BT_LAST) == (got == 7), "last word flagged");
        got++;
      end
      tick();
    end
    check(got == 8 && first == 3, "8 words, first on the bus three cycles after data-send");
    tb_ack = '0;
    rd(REG_DMA_STAT, d); check(ds(d).send_done, "send_done");
    wr(REG_CMD, cmdw(OP_RELEASE, TAP_H)); tick(2);
    check(!owner_valid[0], "H bus released");

    // receive 5 words from the V bus (sender tap 3) into memory 0x300
    wr(REG_IRQ_EN, {14'b0, 2'd0, 16'h0002});
    tb_own(1, 3);
    tb_drv[1][3] = '{typ: BT_SIGNAL, data: 32'(ROW)}; tick(); tb_drv[1][3] = BUS_IDLE; tick(2);
    check(irq[0], "signal interrupt on cpu 0");
    rd(REG_IRQ_PEND, d); check(d[IRQ_SIG_V], "pending source is V signal");
    wr(REG_ADDR, 32'h300); wr(REG_CMD, cmdw(OP_RECV, TAP_V)); tick(2);
    check(!irq[0], "data-receive clears the interrupt");
    check(ack_in[1], "node acknowledges on V");
    for (int i = 0; i < 5; i++) begin
      tb_drv[1][3] = '{typ: (i == 4) ? BT_LAST : BT_DATA, data: 32'hDEAD_0000 + 32'(i)}; tick();
    end
    tb_drv[1][3] = BUS_IDLE; tick(2);
    for (int i = 0; i < 5; i++) check(mem[32'h300 + i] == 32'hDEAD_0000 + 32'(i), "received word");
    rd(REG_DMA_STAT, d);
    check(ds(d).recv_done && ds(d).rx_count == 5, "rx_count 5");
    check(!ack_in[1], "acknowledge dropped after last word");

    // masked signal: no interrupt, status still shows it
    wr(REG_IRQ_EN, {14'b0, 2'd0, 16'h0000});
    tb_drv[1][3] = '{typ: BT_SIGNAL, data: 32'(ROW)}; tick(); tb_drv[1][3] = BUS_IDLE; tick(2);
    rd(REG_STAT_V, d);
    check(!irq[0] && ts(d).sig_pending, "masked signal visible by polling");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
