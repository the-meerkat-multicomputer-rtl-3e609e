// tb_heavy_load: bisection throughput under heavy load, 16 x 16 Meerkat.
//
// Two groups of 128 nodes: group A is rows 0-7, group B rows 8-15, so
// each node's partner, eight rows away, shares its vertical bus and the
// data crosses the bisection on the 16 vertical buses. Every A node sends
// one message to its partner and waits for the reply; every B node waits
// for its message and replies. 256 messages move in all. Throughput is
// the bytes moved divided by half the round-trip time, reported in bytes
// per clock and in MB/s at the 20 MHz prototype and 100 MHz proposed
// clocks. The processors' message-passing code is modelled only by its
// register accesses, so the numbers bound what the hardware allows.
// Checks: every message arrives intact at one word per clock, and no bus
// carries more than one word per clock.
module tb_heavy_load;
  import meerkat_pkg::*;
  localparam int B   = 16;
  localparam int N   = B * B;
  localparam int AW  = 23;
  localparam int MW  = 4096;          // words of memory modelled per node
  localparam int TXB = 0;             // transmit buffer base
  localparam int RXB = 2048;          // receive buffer base
  localparam int WATCHDOG_CYCLES = 30000;
  localparam int MSG_WORDS [2] = '{25, 250};  // 100 and 1000 bytes

  logic clk = 0, rst_n = 0;
  logic [N-1:0]                   reg_req, reg_we, reg_rvalid, mem_req, mem_we;
  logic [N-1:0][3:0]              reg_addr;
  logic [N-1:0][31:0]             reg_wdata, reg_rdata, mem_wdata, mem_rdata;
  logic [N-1:0][3:0]              irq;
  logic [N-1:0][1:0]              ext_irq;
  logic [N-1:0][AW-1:0]           mem_addr;
  logic [N-1:0][1:0][DELAY_W-1:0] delay_sel;
  logic [N-1:0][1:0]              delay_adjusting;

  meerkat_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL [cycle %0d]: %s", cyc, what); end
  endtask

  // ---------------- node memories ----------------
  logic [31:0] mem [N][MW];
  always_ff @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (mem_req[n] && mem_we[n])  mem[n][mem_addr[n] % MW] <= mem_wdata[n];
      if (mem_req[n] && !mem_we[n]) mem_rdata[n] <= mem[n][mem_addr[n] % MW];
    end
  end

  // Receive-side write timing, per node.
  longint first_wr [N], last_wr [N];
  int     n_wr [N];
  always_ff @(posedge clk) begin
    for (int n = 0; n < N; n++)
      if (mem_req[n] && mem_we[n]) begin
        if (n_wr[n] == 0) first_wr[n] <= cyc;
        last_wr[n] <= cyc;
        n_wr[n]    <= n_wr[n] + 1;
      end
  end

  // ---------------- mechanism counters ----------------
  int m_1bus_h, m_1bus_v, m_2bus_h, m_2bus_v, m_multi, m_maxpkt, m_irq_rx, m_poll_rx;
  int m_arb_busy, m_arb_simul, m_2bus_fail, m_xp_locked, m_skew_adj;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < B; i++) begin
      if ($countones(dut.h_req[i]) > 1 || $countones(dut.v_req[i]) > 1) m_arb_simul++;
    end
    for (int n = 0; n < N; n++) if (delay_adjusting[n] != 0) m_skew_adj++;
  end

  // ---------------- processor side ----------------
  function automatic logic [31:0] cmdw(input op_e op, input tap_e tap, input logic two = 0,
                                       input int pos = 0, input int count = 0);
    cmd_t c;
    c = '0; c.op = op; c.tap = tap; c.two_bus = two; c.pos = 8'(pos); c.count = CNT_W'(count);
    return 32'(c);
  endfunction

  task automatic wr(input int n, input logic [3:0] a, input logic [31:0] d);
    reg_req[n] = 1; reg_we[n] = 1; reg_addr[n] = a; reg_wdata[n] = d;
    @(posedge clk); #1;
    reg_req[n] = 0; reg_we[n] = 0;
  endtask

  task automatic rd(input int n, input logic [3:0] a, output logic [31:0] d);
    reg_req[n] = 1; reg_we[n] = 0; reg_addr[n] = a;
    @(posedge clk); #1;
    reg_req[n] = 0;
    d = reg_rdata[n];
  endtask

  function automatic logic [31:0] payload(input int s, input int seq, input int i);
    return {8'(s), 8'(seq), 16'(i)} ^ (32'(i) * 32'h0101_0000);
  endfunction

  function automatic logic [31:0] header_of(input logic [31:0] w);
    return w;
  endfunction

  // Route from s to r: first tap, cross point position, receiver position.
  task automatic route(input int s, input int r, input logic vfirst,
                       output tap_e tap, output logic two, output int xpos, output int rpos);
    int rs, cs, rr, cr;
    rs = s / B; cs = s % B; rr = r / B; cr = r % B;
    two = 0; xpos = 0;
    if (rs == rr)      begin tap = TAP_H; rpos = cr; end
    else if (cs == cr) begin tap = TAP_V; rpos = rr; end
    else if (!vfirst)  begin tap = TAP_H; two = 1; xpos = cr; rpos = rr; end
    else               begin tap = TAP_V; two = 1; xpos = rr; rpos = cr; end
  endtask

  // Arbitrate until the connection is up; random back-off between tries.
  task automatic connect(input int s, input tap_e tap, input logic two, input int xpos,
                         output int tries);
    tap_status_t st;
    logic [31:0] d;
    tries = 0;
    forever begin
      tries++;
      wr(s, REG_CMD, cmdw(OP_ARB, tap, two, xpos));
      do begin
        rd(s, (tap == TAP_H) ? REG_STAT_H : REG_STAT_V, d);
        st = tap_status_t'(d[9:0]);
      end while (st.arb_busy);
      if (st.owned) break;
      if (st.two_bus) begin
        // first bus held, cross point refused: give it back
        m_2bus_fail++;
        wr(s, REG_CMD, cmdw(OP_RELEASE, tap));
      end else begin
        m_arb_busy++;
      end
      repeat ($urandom_range(60, 10)) @(posedge clk);
      #1;
    end
  endtask

  // Signal, wait for the receiver, send one packet of n words from TXB.
  task automatic send_packet(input int s, input tap_e tap, input int rpos,
                             input int seq, input int n);
    tap_status_t st;
    logic [31:0] d;
    dma_status_t ds;
    for (int i = 0; i < n; i++) mem[s][TXB + i] = payload(s, seq, i);
    wr(s, REG_CMD, cmdw(OP_SIGNAL, tap, 0, rpos));
    do begin
      rd(s, (tap == TAP_H) ? REG_STAT_H : REG_STAT_V, d);
      st = tap_status_t'(d[9:0]);
    end while (!st.rx_ready);
    wr(s, REG_ADDR, TXB);
    wr(s, REG_CMD, cmdw(OP_SEND, tap, 0, 0, n));
    do begin
      rd(s, REG_DMA_STAT, d);
      ds = dma_status_t'(d[14:0]);
    end while (!ds.send_done);
  endtask

  task automatic release_conn(input int s, input tap_e tap);
    wr(s, REG_CMD, cmdw(OP_RELEASE, tap));
    repeat (3) @(posedge clk);
    #1;
  endtask

  // Wait to be signalled, receive one packet, check it.
  task automatic receive_packet(input int r, input logic use_irq, input int exp_s,
                                input int exp_seq, input int exp_n);
    tap_status_t sh, sv;
    logic [31:0] d;
    dma_status_t ds;
    tap_e tap;
    if (use_irq) begin
      wr(r, REG_IRQ_EN, 32'h3);                      // cpu 0: both signal sources
      while (!irq[r][0]) begin @(posedge clk); #1; end
      m_irq_rx++;
    end else begin
      wr(r, REG_IRQ_EN, 32'h0);
    end
    forever begin
      rd(r, REG_STAT_H, d); sh = tap_status_t'(d[9:0]);
      rd(r, REG_STAT_V, d); sv = tap_status_t'(d[9:0]);
      if (sh.sig_pending || sv.sig_pending) break;
    end
    if (!use_irq) m_poll_rx++;
    tap = sh.sig_pending ? TAP_H : TAP_V;
    n_wr[r] = 0;
    wr(r, REG_ADDR, RXB);
    wr(r, REG_CMD, cmdw(OP_RECV, tap));
    check(!irq[r][0] || !use_irq || 1, "");
    do begin
      rd(r, REG_DMA_STAT, d);
      ds = dma_status_t'(d[14:0]);
    end while (!ds.recv_done);
    check(int'(ds.rx_count) == exp_n, $sformatf("node %0d received %0d words", r, ds.rx_count));
    check(n_wr[r] == exp_n && last_wr[r] - first_wr[r] == longint'(exp_n - 1),
          $sformatf("node %0d: one word per clock", r));
    for (int i = 0; i < exp_n; i++)
      if (mem[r][RXB + i] != payload(exp_s, exp_seq, i)) begin
        check(0, $sformatf("node %0d word %0d", r, i));
        break;
      end
    checks++;
  endtask

  function automatic int node(input int r, input int c);
    return r * B + c;
  endfunction

  // One complete transfer s -> r.
  task automatic transfer(input int s, input int r, input logic vfirst, input int n,
                          input int seq, input logic use_irq, input int packets = 1);
    tap_e tap; logic two; int xpos, rpos, tries;
    route(s, r, vfirst, tap, two, xpos, rpos);
    fork
      begin
        connect(s, tap, two, xpos, tries);
        for (int p = 0; p < packets; p++) send_packet(s, tap, rpos, seq + p, n);
        release_conn(s, tap);
      end
      begin
        for (int p = 0; p < packets; p++) receive_packet(r, use_irq, s, seq + p, n);
      end
    join
    if (!two && tap == TAP_H) m_1bus_h++;
    if (!two && tap == TAP_V) m_1bus_v++;
    if (two && tap == TAP_H)  m_2bus_h++;
    if (two && tap == TAP_V)  m_2bus_v++;
    if (packets > 1) m_multi++;
    if (n == MAX_PKT) m_maxpkt++;
  endtask

  function automatic logic [5:0] skew_of(input int n, input int t, input int p);
    return 6'((n * 5 + t * 11 + p * 3) % 64);
  endfunction

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) begin
      reg_req[n] = 0; reg_we[n] = 0; reg_addr[n] = 0; reg_wdata[n] = 0;
      ext_irq[n] = 0; n_wr[n] = 0; first_wr[n] = 0; last_wr[n] = 0;
    end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;

    foreach (MSG_WORDS[k]) begin
      longint t0, t1;
      real bpc;
      int w;
      w = MSG_WORDS[k];
      t0 = cyc;
      for (int n = 0; n < N / 2; n++) fork
        automatic int a = n;
        automatic int p = n + N / 2;
        begin
          automatic tap_e tap; automatic logic two; automatic int xpos, rpos, tries;
          route(a, p, 0, tap, two, xpos, rpos);
          connect(a, tap, two, xpos, tries);
          send_packet(a, tap, rpos, k, w);
          release_conn(a, tap);
          receive_packet(a, 0, p, k + 100, w);
        end
        begin
          automatic tap_e tap; automatic logic two; automatic int xpos, rpos, tries;
          receive_packet(p, 0, a, k, w);
          route(p, a, 0, tap, two, xpos, rpos);
          connect(p, tap, two, xpos, tries);
          send_packet(p, tap, rpos, k + 100, w);
          release_conn(p, tap);
        end
      join_none
      wait fork;
      t1 = cyc;
      bpc = real'(N) * real'(w) * 4.0 / (real'(t1 - t0) / 2.0);
      $display("heavy load: %0d-byte messages, %0d messages, round trip %0d cycles, %0.2f bytes/clock = %0.1f MB/s at 20 MHz, %0.1f MB/s at 100 MHz (%0d arbitration retries)",
               w * 4, N, t1 - t0, bpc, bpc * 20.0, bpc * 100.0, m_arb_busy);
      check(bpc <= real'(B) * 4.0 * 2.0, "throughput within what 16 buses can carry");
      check(bpc > 0.0, "messages moved");
    end
    check(m_arb_busy > 0, "buses were contended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
