// tb_dma_engine: checks packet copying between memory and the bus side.
// A behavioural memory with one-cycle read latency serves the engine.
// Send: the words handed to the bus must be the memory words in order, one
// per cycle, the first two cycles after the command, with the last one
// flagged. Receive: words fed one per cycle must land at consecutive
// addresses in the cycle they arrive, and rx_count must match. Also checks
// the 1024-word maximum and that a zero-length send is refused.
module tb_dma_engine;
  import meerkat_pkg::*;
  localparam int AW = 12;
  logic clk = 0, rst_n = 0;
  logic send_start, recv_start, clear_done;
  logic [AW-1:0] start_addr;
  logic [CNT_W-1:0] send_count, rx_count;
  logic mem_req, mem_we;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata, tx_data, rx_data;
  logic tx_valid, tx_last, rx_valid, rx_last;
  logic sending, receiving, send_done, recv_done, overflow;
  logic [31:0] mem [1 << AW];
  int checks = 0, failures = 0;

  dma_engine #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (mem_req && mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_req && !mem_we) mem_rdata <= mem[mem_addr];
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] pattern(input int a);
    return 32'(a) * 32'h9E37_79B9 + 32'h1234;
  endfunction

  task automatic do_send(input int addr, input int n);
    int got, first_cycle, cyc;
    send_start = 1; start_addr = AW'(addr); send_count = CNT_W'(n);
    @(posedge clk); #1 send_start = 0;
    got = 0; cyc = 1; first_cycle = -1;
    while (got < n && cyc < n + 20) begin
      if (tx_valid) begin
        if (first_cycle < 0) first_cycle = cyc;
        check(tx_data == pattern(addr + got), "send word matches memory");
        check(tx_last == (got == n - 1), "last flag");
        check(cyc == first_cycle + got, "one word per cycle");
        got++;
      end
      @(posedge clk); #1; cyc++;
    end
    check(got == n, "all words sent");
    check(first_cycle == 2, "first word two cycles after command");
    @(posedge clk); #1;
    check(send_done && !sending, "send done");
  endtask

  task automatic do_recv(input int addr, input int n);
    recv_start = 1; start_addr = AW'(addr);
    @(posedge clk); #1 recv_start = 0;
    for (int i = 0; i < n; i++) begin
      rx_valid = 1; rx_data = ~pattern(i); rx_last = (i == n - 1);
      @(posedge clk); #1;
    end
    rx_valid = 0; rx_last = 0;
    @(posedge clk); #1;
    check(recv_done && !receiving, "receive done");
    check(rx_count == CNT_W'(n), "rx_count");
    for (int i = 0; i < n; i++) check(mem[addr + i] == ~pattern(i), "received word in memory");
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    send_start = 0; recv_start = 0; clear_done = 0; start_addr = 0; send_count = 0;
    rx_valid = 0; rx_data = 0; rx_last = 0;
    for (int a = 0; a < (1 << AW); a++) mem[a] = pattern(a);
    repeat (2) @(posedge clk); #1 rst_n = 1;
    do_send(100, 1);
    do_send(200, 37);
    do_send(1024, MAX_PKT);
    do_recv(3000, 5);
    do_recv(2000, 64);
    // zero-length send is ignored
    send_start = 1; start_addr = 0; send_count = 0;
    @(posedge clk); #1 send_start = 0;
    check(!sending && !mem_req, "zero-length send refused");
    clear_done = 1; @(posedge clk); #1 clear_done = 0;
    check(!send_done && !recv_done, "done flags clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
