// tb_bus_arbiter: checks single-attempt arbitration of one bus.
// Covers: grant to a lone requester two cycles after its request, failure
// of every request while the bus is owned, one winner among simultaneous
// requesters with round-robin rotation, owner broadcast, and release.
module tb_bus_arbiter;
  localparam int B = 4;
  logic clk = 0, rst_n = 0;
  logic [B-1:0] req, rel, gnt, fail;
  logic owner_valid;
  logic [1:0] owner;
  int checks = 0, failures = 0;

  bus_arbiter #(.B(B)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Request from a set of taps; return the grant/fail vectors seen.
  task automatic attempt(input logic [B-1:0] who, output logic [B-1:0] g, output logic [B-1:0] f);
    req = who; @(posedge clk); #1 req = '0;
    g = gnt; f = fail;
    @(posedge clk); #1;
    check(gnt == 0 && fail == 0, "answer lasts one cycle");
  endtask

  task automatic release_bus(input int t);
    rel = '0; rel[t] = 1'b1; @(posedge clk); #1 rel = '0;
    @(posedge clk); #1;
  endtask

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [B-1:0] g, f;
    int winners [B];
    req = '0; rel = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(!owner_valid, "free after reset");

    attempt(4'b0100, g, f);
    check(g == 4'b0100 && f == 4'b0000, "lone request granted");
    check(owner_valid && owner == 2, "owner broadcast is tap 2");

    attempt(4'b1011, g, f);
    check(g == 0 && f == 4'b1011, "requests fail while bus owned");
    check(owner_valid && owner == 2, "owner unchanged");

    release_bus(2);
    check(!owner_valid, "free after release");

    // Simultaneous requests: exactly one winner, the rest fail; rotation
    // gives every tap a turn over B rounds.
    foreach (winners[i]) winners[i] = 0;
    for (int round = 0; round < 2 * B; round++) begin
      attempt(4'b1111, g, f);
      check($onehot(g) && (g | f) == 4'b1111 && (g & f) == 0, "one winner, others fail");
      for (int i = 0; i < B; i++) if (g[i]) begin
        winners[i]++;
        check(owner == 2'(i), "owner matches winner");
        release_bus(i);
      end
    end
    for (int i = 0; i < B; i++) check(winners[i] == 2, "round robin fairness");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
