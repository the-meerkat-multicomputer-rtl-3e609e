// tb_skew_table: checks the per-tap delay lookup.
// Loads a table with values from a formula, then moves bus ownership
// around and checks that each tap's delay setting follows the current
// master one cycle later, with `adjusting` high exactly on the cycle
// after a change of master.
module tb_skew_table;
  import meerkat_pkg::*;
  localparam int B = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  tap_e wr_tap, rd_tap;
  logic [3:0] wr_pos, rd_pos;
  logic [5:0] wr_delay, rd_delay;
  logic [1:0] owner_valid, adjusting;
  logic [1:0][3:0] owner;
  logic [1:0][5:0] delay_sel;
  int checks = 0, failures = 0;

  skew_table #(.B(B)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [5:0] expect_delay(input int t, input int p);
    return 6'((p * 7 + t * 13 + 3) % 64);
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #500000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int prev [2];
    wr_en = 0; wr_tap = TAP_H; wr_pos = 0; wr_delay = 0; rd_tap = TAP_H; rd_pos = 0;
    owner_valid = 0; owner = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 2; t++)
      for (int p = 0; p < B; p++) begin
        wr_en = 1; wr_tap = tap_e'(t); wr_pos = 4'(p); wr_delay = expect_delay(t, p);
        @(posedge clk); #1;
      end
    wr_en = 0;
    for (int t = 0; t < 2; t++)
      for (int p = 0; p < B; p++) begin
        rd_tap = tap_e'(t); rd_pos = 4'(p); #1;
        check(rd_delay == expect_delay(t, p), "read-back");
      end
    prev[0] = 0; prev[1] = 0;
    owner_valid = 2'b11;
    @(posedge clk); #1;
    for (int i = 0; i < 60; i++) begin
      int nh, nv;
      nh = (i % 4 == 0) ? $urandom_range(B - 1) : prev[0];
      nv = (i % 5 == 0) ? $urandom_range(B - 1) : prev[1];
      owner[0] = 4'(nh); owner[1] = 4'(nv);
      @(posedge clk); #1;
      check(delay_sel[0] == expect_delay(0, nh), "H delay follows master");
      check(delay_sel[1] == expect_delay(1, nv), "V delay follows master");
      check(adjusting[0] == (nh != prev[0]), "H adjust cycle");
      check(adjusting[1] == (nv != prev[1]), "V adjust cycle");
      prev[0] = nh; prev[1] = nv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
