// tb_interrupt_controller: checks per-processor masking of level sources.
// Random source patterns and masks; each processor's line must equal the
// OR of its enabled sources one cycle later.
module tb_interrupt_controller;
  localparam int NSRC = 6, NCPU = 4;
  logic clk = 0, rst_n = 0;
  logic [NSRC-1:0] src, en_value, pending;
  logic en_we;
  logic [1:0] en_cpu;
  logic [NCPU-1:0][NSRC-1:0] enable;
  logic [NCPU-1:0] irq;
  logic [NSRC-1:0] model [NCPU];
  int checks = 0, failures = 0;

  interrupt_controller #(.NSRC(NSRC), .NCPU(NCPU)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    src = 0; en_we = 0; en_cpu = 0; en_value = 0;
    foreach (model[c]) model[c] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    src = '1; @(posedge clk); #1;
    check(irq == 0, "all masked after reset");
    for (int i = 0; i < 200; i++) begin
      logic [NSRC-1:0] old_model [NCPU];
      old_model = model;
      if (i % 3 == 0) begin
        en_we = 1; en_cpu = 2'($urandom_range(NCPU - 1)); en_value = NSRC'($urandom);
        model[en_cpu] = en_value;
      end else en_we = 0;
      src = NSRC'($urandom);
      @(posedge clk); #1;
      en_we = 0;
      check(pending == src, "pending shows sources");
      for (int c = 0; c < NCPU; c++) begin
        check(enable[c] == model[c], "mask register");
        check(irq[c] == |(src & old_model[c]), "irq is OR of enabled sources");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
