// meerkat_top: a B x B Meerkat multicomputer interconnect.
//
// Nodes sit on a square grid. Node (r, c) taps horizontal bus r at
// position c and vertical bus c at position r, so any two nodes in one row
// or column talk over a 1-bus connection and any other pair over a 2-bus
// connection through the node at the corner (r_sender, c_receiver) or
// (r_receiver, c_sender) acting as cross point. The buses are passive and
// unbuffered; there is no router anywhere. With the default B = 16 the
// system has 256 nodes and 32 buses, the largest size the Meerkat architecture
// expects bus electrical limits to allow.
//
// Node n = r*B + c. Every node's processor register port, memory port,
// interrupt lines and delay-chain settings are ports of this module, one
// array element per node: processors, DRAM and delay chains lie outside
// the logic described here. All ports are synchronous to clk, one system
// clock for the whole machine.
module meerkat_top
  import meerkat_pkg::*;
#(
  parameter int unsigned B     = 16,
  parameter int unsigned AW    = 23,
  parameter int unsigned NCPU  = 4,
  parameter int unsigned N     = B * B,
  parameter int unsigned POS_W = (B > 1) ? $clog2(B) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N-1:0]                  reg_req,
  input  logic [N-1:0]                  reg_we,
  input  logic [N-1:0][3:0]             reg_addr,
  input  logic [N-1:0][WORD_W-1:0]      reg_wdata,
  output logic [N-1:0][WORD_W-1:0]      reg_rdata,
  output logic [N-1:0]                  reg_rvalid,
  output logic [N-1:0][NCPU-1:0]        irq,
  input  logic [N-1:0][1:0]             ext_irq,
  output logic [N-1:0]                  mem_req,
  output logic [N-1:0]                  mem_we,
  output logic [N-1:0][AW-1:0]          mem_addr,
  output logic [N-1:0][WORD_W-1:0]      mem_wdata,
  input  logic [N-1:0][WORD_W-1:0]      mem_rdata,
  output logic [N-1:0][1:0][DELAY_W-1:0] delay_sel,
  output logic [N-1:0][1:0]             delay_adjusting
);

  // Per-bus tap bundles: [bus][tap].
  bus_fwd_t [B-1:0][B-1:0] h_drv, v_drv;
  logic     [B-1:0][B-1:0] h_ack_drv, v_ack_drv, h_req, v_req, h_rel, v_rel;
  logic     [B-1:0][B-1:0] h_gnt, v_gnt, h_fail, v_fail;
  bus_fwd_t [B-1:0]        h_fwd, v_fwd;
  logic     [B-1:0]        h_ack, v_ack, h_own_v, v_own_v;
  logic     [B-1:0][POS_W-1:0] h_own, v_own;

  for (genvar i = 0; i < B; i++) begin : g_bus
    internode_bus #(.B(B), .POS_W(POS_W)) u_hbus (
      .clk, .rst_n,
      .fwd_drv (h_drv[i]), .ack_drv (h_ack_drv[i]),
      .arb_req (h_req[i]), .arb_rel (h_rel[i]),
      .fwd (h_fwd[i]), .ack (h_ack[i]),
      .arb_gnt (h_gnt[i]), .arb_fail (h_fail[i]),
      .owner_valid (h_own_v[i]), .owner (h_own[i])
    );
    internode_bus #(.B(B), .POS_W(POS_W)) u_vbus (
      .clk, .rst_n,
      .fwd_drv (v_drv[i]), .ack_drv (v_ack_drv[i]),
      .arb_req (v_req[i]), .arb_rel (v_rel[i]),
      .fwd (v_fwd[i]), .ack (v_ack[i]),
      .arb_gnt (v_gnt[i]), .arb_fail (v_fail[i]),
      .owner_valid (v_own_v[i]), .owner (v_own[i])
    );
  end

  for (genvar r = 0; r < B; r++) begin : g_row
    for (genvar c = 0; c < B; c++) begin : g_col
      localparam int unsigned n = r * B + c;
      bus_fwd_t [1:0] fwd_out;
      logic     [1:0] ack_out, arb_req, arb_rel;

      meerkat_node #(.B(B), .POS_W(POS_W), .AW(AW), .NCPU(NCPU)) u_node (
        .clk, .rst_n,
        .row        (POS_W'(r)),
        .col        (POS_W'(c)),
        .reg_req    (reg_req[n]),
        .reg_we     (reg_we[n]),
        .reg_addr   (reg_addr[n]),
        .reg_wdata  (reg_wdata[n]),
        .reg_rdata  (reg_rdata[n]),
        .reg_rvalid (reg_rvalid[n]),
        .irq        (irq[n]),
        .ext_irq    (ext_irq[n]),
        .mem_req    (mem_req[n]),
        .mem_we     (mem_we[n]),
        .mem_addr   (mem_addr[n]),
        .mem_wdata  (mem_wdata[n]),
        .mem_rdata  (mem_rdata[n]),
        .fwd_in     ({v_fwd[c], h_fwd[r]}),
        .ack_in     ({v_ack[c], h_ack[r]}),
        .fwd_out,
        .ack_out,
        .arb_req,
        .arb_rel,
        .arb_gnt    ({v_gnt[c][r], h_gnt[r][c]}),
        .arb_fail   ({v_fail[c][r], h_fail[r][c]}),
        .owner_valid({v_own_v[c], h_own_v[r]}),
        .owner      ({v_own[c], h_own[r]}),
        .delay_sel  (delay_sel[n]),
        .delay_adjusting (delay_adjusting[n])
      );

      assign h_drv[r][c]     = fwd_out[TAP_H];
      assign v_drv[c][r]     = fwd_out[TAP_V];
      assign h_ack_drv[r][c] = ack_out[TAP_H];
      assign v_ack_drv[c][r] = ack_out[TAP_V];
      assign h_req[r][c]     = arb_req[TAP_H];
      assign v_req[c][r]     = arb_req[TAP_V];
      assign h_rel[r][c]     = arb_rel[TAP_H];
      assign v_rel[c][r]     = arb_rel[TAP_V];
    end
  end

endmodule
