// tb_cycle_counter: checks counting, loading and wrap-around.
module tb_cycle_counter;
  logic clk = 0, rst_n = 0, load;
  logic [31:0] load_value, count;
  int checks = 0, failures = 0;

  cycle_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; load_value = 0;
    repeat (2) @(posedge clk); #1;
    check(count == 0, "zero in reset");
    rst_n = 1;
    for (int i = 1; i <= 50; i++) begin
      @(posedge clk); #1;
      check(count == 32'(i), "counts cycles");
    end
    load = 1; load_value = 32'hFFFF_FFFD; @(posedge clk); #1 load = 0;
    check(count == 32'hFFFF_FFFD, "load");
    repeat (3) @(posedge clk); #1;
    check(count == 32'h0, "wraps at 2^32");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
