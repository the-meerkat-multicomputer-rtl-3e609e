// bus_arbiter: ownership arbiter of one internode bus.
//
// Grants a bus to one tap at a time and tells every tap, on every cycle,
// which tap is the current bus master (owner_valid/owner), as the clocked
// bus protocol requires. Arbitration is a single attempt: a tap pulses
// req for one cycle and two cycles later sees either gnt or fail. A request
// made while the bus is owned fails; of several requests to a free bus the
// first one at or after a rotating pointer wins and the others fail. The
// owner frees the bus with a one-cycle rel pulse. A failed attempt is
// retried by software after a random back-off; the arbiter itself never
// queues a request, so a node that cannot get the second bus of a 2-bus
// connection is told so instead of waiting on it.
//
// The Meerkat architecture fixes that one node at a time owns a bus and that all
// nodes know the master each cycle; the single-attempt protocol, the
// round-robin choice and the registered outputs are this design's choices.
module bus_arbiter #(
  parameter int unsigned B     = 16,
  parameter int unsigned POS_W = (B > 1) ? $clog2(B) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [B-1:0]     req,
  input  logic [B-1:0]     rel,
  output logic [B-1:0]     gnt,
  output logic [B-1:0]     fail,
  output logic             owner_valid,
  output logic [POS_W-1:0] owner
);

  logic [POS_W-1:0] rr_ptr;
  logic             pick_valid;
  logic [POS_W-1:0] pick;

  // First requester at or after the round-robin pointer.
  always_comb begin
    pick_valid = 1'b0;
    pick       = '0;
    for (int unsigned k = 0; k < B; k++) begin
      int unsigned idx;
      idx = (int'(rr_ptr) + k) % B;
      if (!pick_valid && req[idx]) begin
        pick_valid = 1'b1;
        pick       = POS_W'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner_valid <= 1'b0;
      owner       <= '0;
      rr_ptr      <= '0;
      gnt         <= '0;
      fail        <= '0;
    end else begin
      gnt  <= '0;
      fail <= req;
      if (owner_valid) begin
        if (rel[owner]) owner_valid <= 1'b0;
      end else if (pick_valid) begin
        owner_valid <= 1'b1;
        owner       <= pick;
        rr_ptr      <= (int'(pick) == B - 1) ? '0 : pick + 1'b1;
        gnt[pick]   <= 1'b1;
        fail[pick]  <= 1'b0;
      end
    end
  end

  // Only the owner may release, and only while it owns the bus.
  property p_rel_by_owner;
    @(posedge clk) disable iff (!rst_n)
      rel != '0 |-> (owner_valid && rel == (B'(1) << owner));
  endproperty
  a_rel_by_owner: assert property (p_rel_by_owner)
    else $error("bus_arbiter: release from a tap that does not own the bus");

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt))
    else $error("bus_arbiter: more than one grant");

endmodule
