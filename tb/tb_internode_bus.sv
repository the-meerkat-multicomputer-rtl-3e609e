// tb_internode_bus: checks the wired-OR bus model and its arbiter.
// One tap drives words and the others must see them unchanged; the
// acknowledge line from another tap reaches all taps; the arbiter inside
// grants and releases ownership.
module tb_internode_bus;
  import meerkat_pkg::*;
  localparam int B = 4;
  logic clk = 0, rst_n = 0;
  bus_fwd_t [B-1:0] fwd_drv;
  logic [B-1:0] ack_drv, arb_req, arb_rel, arb_gnt, arb_fail;
  bus_fwd_t fwd;
  logic ack, owner_valid;
  logic [1:0] owner;
  int checks = 0, failures = 0;

  internode_bus #(.B(B)) dut (.*);

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
    fwd_drv = '{default: BUS_IDLE}; ack_drv = '0; arb_req = '0; arb_rel = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    arb_req[1] = 1; @(posedge clk); #1 arb_req = '0;
    check(arb_gnt == 4'b0010 && owner_valid && owner == 1, "tap 1 owns the bus");
    for (int i = 0; i < 20; i++) begin
      bus_fwd_t w;
      w.typ = (i == 19) ? BT_LAST : BT_DATA;
      w.data = $urandom;
      fwd_drv[1] = w;
      ack_drv[3] = (i % 3) == 0;
      #1;
      check(fwd == w, "bus carries the driven word");
      check(ack == ((i % 3) == 0), "bus carries the acknowledge");
      @(posedge clk); #1;
    end
    fwd_drv[1] = BUS_IDLE; ack_drv = '0; #1;
    check(fwd == BUS_IDLE && !ack, "idle bus reads idle");
    arb_req[2] = 1; @(posedge clk); #1 arb_req = '0;
    check(arb_fail == 4'b0100, "second requester fails");
    arb_rel[1] = 1; @(posedge clk); #1 arb_rel = '0; @(posedge clk); #1;
    check(!owner_valid, "released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
