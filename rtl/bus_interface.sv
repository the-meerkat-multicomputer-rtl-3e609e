// bus_interface: a node's two bus taps and the five primitive commands.
//
// The processor drives the interconnect through memory-mapped commands,
// each aimed at the horizontal (H) or vertical (V) tap:
//   arbitrate  acquire the tap's bus; for a 2-bus connection also ask the
//              node at position `pos` on that bus to acquire its orthogonal
//              bus and act as cross point. Success or failure is reported in
//              the tap status; a failed 2-bus attempt keeps the first bus
//              until software releases it.
//   signal     alert the receiver at position `pos` on the last bus of the
//              connection: sets sig_sent here and sig_pending (an interrupt
//              source) in the receiver.
//   data-receive  (receiver) clear sig_pending, arm the DMA at the buffer
//              address and drive the acknowledge line: the node is receptive.
//   data-send  (sender, once rx_ready is seen) stream `count` words from
//              memory through the active tap, one per clock.
//   release    give the bus(es) back; a 2-bus connection first sends a
//              RELEASE word that frees the cross point's bus.
// Each tap runs its own owner state machine (IDLE, ARB_REQ, ARB_WAIT,
// SETTLE, XWAIT, CONN, HELD, REL). SETTLE is the cycle lost after a change
// of bus master while delay chains adjust. Independently, the node can be a
// cross point: when an XREQ naming it arrives on one tap while both its
// taps are idle, it arbitrates for the other bus and, if granted, pulses
// the acknowledge line once, then forwards every forward word from the
// first bus to the second and the acknowledge line back, each through one
// register, until it forwards the RELEASE word. Its own processor then
// fails any arbitration for those buses.
//
// All bus outputs are registered. Latencies from a command presented in
// cycle 0: arbitration request on the bus in cycle 1, answer in cycle 2,
// 1-bus connection up (owned) in cycle 4, 2-bus connection up in cycle 8;
// during data-send the first word is on the bus in cycle 3 and one word
// follows every cycle.
//
// The five commands, their effects on status bits and interrupts, the
// rendezvous before data moves, the cross point behaviour and the
// software-managed release of a failed 2-bus arbitration follow the
// document. The bus encoding, the XREQ handshake and its timeout, the
// state machines and the single DMA shared by both taps are this design's.
module bus_interface
  import meerkat_pkg::*;
#(
  parameter int unsigned B        = 16,
  parameter int unsigned POS_W    = (B > 1) ? $clog2(B) : 1,
  parameter int unsigned AW       = 23,
  parameter int unsigned XTIMEOUT = 8   // cycles to wait for a cross point
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [1:0][POS_W-1:0] my_pos,     // position on the H / V bus
  // processor commands
  input  logic                  cmd_valid,
  input  cmd_t                  cmd,
  input  logic [AW-1:0]         cmd_addr,
  output tap_status_t [1:0]     status,
  output logic                  cmd_err,
  // taps
  input  bus_fwd_t [1:0]        fwd_in,
  input  logic [1:0]            ack_in,
  output bus_fwd_t [1:0]        fwd_out,
  output logic [1:0]            ack_out,
  output logic [1:0]            arb_req,
  output logic [1:0]            arb_rel,
  input  logic [1:0]            arb_gnt,
  input  logic [1:0]            arb_fail,
  // DMA engine
  output logic                  dma_send_start,
  output logic                  dma_recv_start,
  output logic                  dma_clear,
  output logic [AW-1:0]         dma_addr,
  output logic [CNT_W-1:0]      dma_count,
  input  logic                  dma_sending,
  input  logic                  dma_receiving,
  input  logic                  dma_tx_valid,
  input  logic [WORD_W-1:0]     dma_tx_data,
  input  logic                  dma_tx_last,
  output logic                  dma_rx_valid,
  output logic [WORD_W-1:0]     dma_rx_data,
  output logic                  dma_rx_last
);

  typedef enum logic [2:0] {
    OS_IDLE, OS_ARB_REQ, OS_ARB_WAIT, OS_SETTLE, OS_XWAIT, OS_CONN, OS_HELD, OS_REL
  } own_state_e;

  typedef enum logic [2:0] {
    XP_IDLE, XP_ARB_REQ, XP_ARB_WAIT, XP_ACK, XP_ACTIVE
  } xp_state_e;

  own_state_e [1:0]       own_q;
  logic [1:0]             two_bus_q, arb_fail_q, sig_sent_q, rx_ready_q;
  logic [1:0]             sig_pending_q, receptive_q, ack_prev_q;
  logic [1:0][POS_W-1:0]  xpos_q;
  logic [1:0][3:0]        timer_q;
  logic [1:0]             rel_q;
  tap_e                   dma_tap_q;
  xp_state_e              xp_q;
  tap_e                   xp_a_q;   // tap the connection comes in on
  bus_fwd_t [1:0]         fwd_q;
  logic [1:0]             ack_q;
  logic                   err_q;

  tap_e  ct;
  assign ct = cmd.tap;

  function automatic logic is_me(input logic [WORD_W-1:0] d, input logic [POS_W-1:0] p);
    return d[POS_FIELD_W-1:0] == POS_FIELD_W'(p);
  endfunction

  logic dma_busy;
  assign dma_busy = dma_sending || dma_receiving;

  // Command legality.
  logic cmd_ok;
  always_comb begin
    cmd_ok = 1'b0;
    unique case (cmd.op)
      OP_ARB:     cmd_ok = (own_q[ct] == OS_IDLE) && (xp_q == XP_IDLE) &&
                           !(cmd.two_bus && POS_W'(cmd.pos) == my_pos[ct]);
      OP_SIGNAL:  cmd_ok = (own_q[ct] == OS_CONN);
      OP_SEND:    cmd_ok = (own_q[ct] == OS_CONN) && !dma_busy &&
                           cmd.count != '0 && cmd.count <= CNT_W'(MAX_PKT);
      OP_RECV:    cmd_ok = !dma_busy && (own_q[ct] == OS_IDLE);
      OP_RELEASE: cmd_ok = (own_q[ct] == OS_CONN || own_q[ct] == OS_HELD) &&
                           !(dma_sending && dma_tap_q == ct);
      default:    cmd_ok = 1'b1;
    endcase
  end

  // DMA handoff.
  assign dma_send_start = cmd_valid && cmd.op == OP_SEND && cmd_ok;
  assign dma_recv_start = cmd_valid && cmd.op == OP_RECV && cmd_ok;
  assign dma_clear      = cmd_valid && (cmd.op == OP_SEND || cmd.op == OP_RECV);
  assign dma_addr       = cmd_addr;
  assign dma_count      = cmd.count;

  // Words arriving for the armed receive.
  always_comb begin
    dma_rx_valid = receptive_q[dma_tap_q] &&
                   (fwd_in[dma_tap_q].typ == BT_DATA || fwd_in[dma_tap_q].typ == BT_LAST);
    dma_rx_data  = fwd_in[dma_tap_q].data;
    dma_rx_last  = fwd_in[dma_tap_q].typ == BT_LAST;
  end

  // Arbitration request and release lines.
  always_comb begin
    for (int t = 0; t < 2; t++) begin
      arb_req[t] = (own_q[t] == OS_ARB_REQ) ||
                   (xp_q == XP_ARB_REQ && int'(xp_a_q) != t);
      arb_rel[t] = rel_q[t];
    end
  end

  assign fwd_out = fwd_q;
  assign ack_out = ack_q;
  assign cmd_err = err_q;

  always_comb begin
    for (int t = 0; t < 2; t++) begin
      status[t].xpoint      = (xp_q == XP_ACK || xp_q == XP_ACTIVE);
      status[t].receptive   = receptive_q[t];
      status[t].sig_pending = sig_pending_q[t];
      status[t].rx_ready    = rx_ready_q[t];
      status[t].sig_sent    = sig_sent_q[t];
      status[t].two_bus     = two_bus_q[t];
      status[t].arb_fail    = arb_fail_q[t];
      status[t].arb_busy    = own_q[t] inside {OS_ARB_REQ, OS_ARB_WAIT, OS_SETTLE, OS_XWAIT};
      status[t].owned       = (own_q[t] == OS_CONN);
      status[t].settle      = (own_q[t] == OS_SETTLE);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_q         <= {OS_IDLE, OS_IDLE};
      two_bus_q     <= '0;
      arb_fail_q    <= '0;
      sig_sent_q    <= '0;
      rx_ready_q    <= '0;
      sig_pending_q <= '0;
      receptive_q   <= '0;
      ack_prev_q    <= '0;
      xpos_q        <= '0;
      timer_q       <= '0;
      rel_q         <= '0;
      dma_tap_q     <= TAP_H;
      xp_q          <= XP_IDLE;
      xp_a_q        <= TAP_H;
      fwd_q         <= {BUS_IDLE, BUS_IDLE};
      ack_q         <= '0;
      err_q         <= 1'b0;
    end else begin
      rel_q      <= '0;
      fwd_q      <= {BUS_IDLE, BUS_IDLE};
      ack_prev_q <= ack_in;

      // ---------------- owner side, per tap ----------------
      for (int t = 0; t < 2; t++) begin
        unique case (own_q[t])
          OS_ARB_REQ:  own_q[t] <= OS_ARB_WAIT;
          OS_ARB_WAIT: begin
            if (arb_gnt[t]) begin
              own_q[t] <= OS_SETTLE;
            end else begin
              own_q[t]      <= OS_IDLE;
              arb_fail_q[t] <= 1'b1;
              two_bus_q[t]  <= 1'b0;
            end
          end
          OS_SETTLE: begin
            if (two_bus_q[t]) begin
              own_q[t]   <= OS_XWAIT;
              timer_q[t] <= '0;
              fwd_q[t]   <= '{typ: BT_XREQ, data: WORD_W'(xpos_q[t])};
            end else begin
              own_q[t] <= OS_CONN;
            end
          end
          OS_XWAIT: begin
            timer_q[t] <= timer_q[t] + 1'b1;
            if (ack_in[t]) begin
              own_q[t] <= OS_CONN;
            end else if (timer_q[t] == 4'(XTIMEOUT - 1)) begin
              own_q[t]      <= OS_HELD;
              arb_fail_q[t] <= 1'b1;
            end
          end
          OS_REL: begin
            own_q[t]     <= OS_IDLE;
            rel_q[t]     <= 1'b1;
            two_bus_q[t] <= 1'b0;
            sig_sent_q[t] <= 1'b0;
            rx_ready_q[t] <= 1'b0;
          end
          default: ;
        endcase

        // Receiver has become receptive: rising acknowledge after a signal.
        if (own_q[t] == OS_CONN && sig_sent_q[t] && ack_in[t] && !ack_prev_q[t]) begin
          rx_ready_q[t] <= 1'b1;
          sig_sent_q[t] <= 1'b0;
        end

        // Being signalled as a receiver on this tap.
        if (fwd_in[t].typ == BT_SIGNAL && !fwd_in[t].data[8] &&
            is_me(fwd_in[t].data, my_pos[t]) &&
            own_q[t] == OS_IDLE && !(xp_q != XP_IDLE && int'(xp_a_q) != t))
          sig_pending_q[t] <= 1'b1;

        // End of an incoming packet.
        if (receptive_q[t] && fwd_in[t].typ == BT_LAST)
          receptive_q[t] <= 1'b0;

        ack_q[t] <= receptive_q[t] && !(fwd_in[t].typ == BT_LAST);
      end

      // Outgoing packet words.
      if (dma_tx_valid)
        fwd_q[dma_tap_q] <= '{typ: dma_tx_last ? BT_LAST : BT_DATA, data: dma_tx_data};

      // ---------------- commands ----------------
      if (cmd_valid) begin
        err_q <= !cmd_ok;
        unique case (cmd.op)
          OP_ARB: begin
            if (cmd_ok) begin
              own_q[ct]      <= OS_ARB_REQ;
              two_bus_q[ct]  <= cmd.two_bus;
              xpos_q[ct]     <= POS_W'(cmd.pos);
              arb_fail_q[ct] <= 1'b0;
              sig_sent_q[ct] <= 1'b0;
              rx_ready_q[ct] <= 1'b0;
            end else begin
              arb_fail_q[ct] <= 1'b1;
            end
          end
          OP_SIGNAL: if (cmd_ok) begin
            fwd_q[ct]      <= '{typ: BT_SIGNAL,
                                data: {{(WORD_W-9){1'b0}}, two_bus_q[ct], cmd.pos}};
            sig_sent_q[ct] <= 1'b1;
            rx_ready_q[ct] <= 1'b0;
          end
          OP_SEND: if (cmd_ok) begin
            dma_tap_q      <= ct;
            rx_ready_q[ct] <= 1'b0;
          end
          OP_RECV: if (cmd_ok) begin
            dma_tap_q         <= ct;
            sig_pending_q[ct] <= 1'b0;
            receptive_q[ct]   <= 1'b1;
          end
          OP_RELEASE: if (cmd_ok) begin
            own_q[ct] <= OS_REL;
            if (two_bus_q[ct]) fwd_q[ct] <= '{typ: BT_RELEASE, data: '0};
          end
          default: ;
        endcase
      end

      // ---------------- cross point ----------------
      unique case (xp_q)
        XP_IDLE: begin
          for (int t = 0; t < 2; t++) begin
            if (fwd_in[t].typ == BT_XREQ && is_me(fwd_in[t].data, my_pos[t]) &&
                own_q[0] == OS_IDLE && own_q[1] == OS_IDLE &&
                !(cmd_valid && cmd.op == OP_ARB)) begin
              xp_q   <= XP_ARB_REQ;
              xp_a_q <= tap_e'(t);
            end
          end
        end
        XP_ARB_REQ:  xp_q <= XP_ARB_WAIT;
        XP_ARB_WAIT: begin
          if (arb_gnt[~xp_a_q]) begin
            xp_q          <= XP_ACK;
            ack_q[xp_a_q] <= 1'b1;
          end else begin
            xp_q <= XP_IDLE;
          end
        end
        XP_ACK, XP_ACTIVE: begin
          xp_q          <= XP_ACTIVE;
          ack_q[xp_a_q] <= ack_in[~xp_a_q];
          fwd_q[~xp_a_q] <= fwd_in[xp_a_q];
          if (fwd_in[xp_a_q].typ == BT_SIGNAL)
            fwd_q[~xp_a_q].data[8] <= 1'b0;
          if (fwd_in[xp_a_q].typ == BT_RELEASE) begin
            xp_q            <= XP_IDLE;
            rel_q[~xp_a_q]  <= 1'b1;
          end
        end
        default: xp_q <= XP_IDLE;
      endcase
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_arb_chk
    a_arb_answer: assert property (@(posedge clk) disable iff (!rst_n)
        own_q[g] == OS_ARB_WAIT |-> (arb_gnt[g] ^ arb_fail[g]))
      else $error("bus_interface: arbiter gave no single answer");
  end

  a_one_cmd_tap_state: assert property (@(posedge clk) disable iff (!rst_n)
      dma_tx_valid |-> (own_q[dma_tap_q] == OS_CONN || own_q[dma_tap_q] == OS_REL))
    else $error("bus_interface: packet word with no connection on the tap");

endmodule
