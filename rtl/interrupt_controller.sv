// interrupt_controller: routes a node's interrupt sources to its processors.
//
// Each source is a level request held by the unit that raised it (the bus
// interface holds "signal pending" until the data-receive command, the DMA
// holds its done bits until the next command). Each of the NCPU processors
// has its own enable mask; a processor's interrupt line is high when any
// enabled source is high. Masking the internode signal source and polling
// the status bit instead is how a receiver avoids the interrupt latency for
// a packet it knows is coming. Reads return the raw pending sources and the
// enable masks; a write sets one processor's mask.
//
// The Meerkat architecture only names an interrupt controller on each node and says
// that a signal requests an interrupt that the receiver may mask; the
// source list, per-processor masks and register layout are this design's.
module interrupt_controller #(
  parameter int unsigned NSRC = 6,
  parameter int unsigned NCPU = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NSRC-1:0]           src,
  input  logic                      en_we,
  input  logic [$clog2(NCPU)-1:0]   en_cpu,
  input  logic [NSRC-1:0]           en_value,
  output logic [NCPU-1:0][NSRC-1:0] enable,
  output logic [NSRC-1:0]           pending,
  output logic [NCPU-1:0]           irq
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     enable <= '0;
    else if (en_we) enable[en_cpu] <= en_value;
  end

  assign pending = src;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) irq <= '0;
    else
      for (int c = 0; c < int'(NCPU); c++)
        irq[c] <= |(src & enable[c]);
  end

endmodule
