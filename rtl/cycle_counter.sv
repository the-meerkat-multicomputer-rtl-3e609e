// cycle_counter: the node's free-running 32-bit cycle counter.
//
// Counts clock cycles from reset and wraps at 2^W. Software reads it to
// time message passing; a write loads a new value (for example to line up
// the counters of several nodes). Read data is the current count; a load
// takes effect on the next clock edge.
//
// The 32-bit width follows the prototype node; the load port is this
// design's choice.
module cycle_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_value,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count <= '0;
    else if (load) count <= load_value;
    else           count <= count + 1'b1;
  end

endmodule
