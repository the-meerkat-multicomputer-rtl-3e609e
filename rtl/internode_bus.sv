// internode_bus: one passive horizontal or vertical internode bus.
//
// The bus itself is wiring on the backplane: every tap's transceivers
// drive the same lines. It is modelled as a wired OR of what the B taps
// drive, in the forward direction (36 lines: data and word type, driven by
// the owner or by a cross point) and on the reverse acknowledge line
// (driven by the receiver). A tap that is not driving holds its outputs at
// zero. The bus's ownership arbiter sits alongside. An assertion flags two
// taps driving the forward lines in the same cycle, which the protocol
// never allows.
//
// The Meerkat architecture gives the passive bus with taps at every node; the wired-OR
// model and the placement of the arbiter with the bus are this design's
// choices.
module internode_bus
  import meerkat_pkg::*;
#(
  parameter int unsigned B     = 16,
  parameter int unsigned POS_W = (B > 1) ? $clog2(B) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // what each tap drives
  input  bus_fwd_t [B-1:0] fwd_drv,
  input  logic     [B-1:0] ack_drv,
  input  logic     [B-1:0] arb_req,
  input  logic     [B-1:0] arb_rel,
  // what every tap sees
  output bus_fwd_t         fwd,
  output logic             ack,
  output logic     [B-1:0] arb_gnt,
  output logic     [B-1:0] arb_fail,
  output logic             owner_valid,
  output logic [POS_W-1:0] owner
);

  logic [B-1:0] driving;

  always_comb begin
    fwd = BUS_IDLE;
    ack = 1'b0;
    for (int unsigned t = 0; t < B; t++) begin
      fwd     = fwd | fwd_drv[t];
      ack     = ack | ack_drv[t];
      driving[t] = (fwd_drv[t] != BUS_IDLE);
    end
  end

  bus_arbiter #(.B(B), .POS_W(POS_W)) u_arb (
    .clk, .rst_n,
    .req(arb_req), .rel(arb_rel),
    .gnt(arb_gnt), .fail(arb_fail),
    .owner_valid, .owner
  );

  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(driving))
    else $error("internode_bus: two taps drive the bus at once");

endmodule
