// skew_table: per-tap clock delay lookup for skew compensation.
//
// Every node runs at the system clock but may be out of phase with any
// other node by up to half a cycle. Each bus tap has a programmable delay
// chain on its received clock. Because every node knows the current master
// of each bus on every cycle, the node looks up, for each tap, the delay
// that suits that master and sets the tap's delay chain to it. The table
// holds 2 x B entries (tap, master position) of DELAY_W bits, written by
// software during a calibration run. When the master of a bus changes,
// the new setting appears one cycle later and `adjusting` is high for that
// cycle: the receiver loses one cycle while its delay chain settles.
//
// Table shape (2 x B), entry width (4 to 6 bits, 6 chosen) and the
// one-cycle adjustment follow the Meerkat architecture. The write/read port and the
// reset value 0 are this design's choices.
module skew_table
  import meerkat_pkg::*;
#(
  parameter int unsigned B     = 16,
  parameter int unsigned POS_W = (B > 1) ? $clog2(B) : 1,
  parameter int unsigned DW    = DELAY_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // calibration write / read-back
  input  logic                  wr_en,
  input  tap_e                  wr_tap,
  input  logic [POS_W-1:0]      wr_pos,
  input  logic [DW-1:0]         wr_delay,
  input  tap_e                  rd_tap,
  input  logic [POS_W-1:0]      rd_pos,
  output logic [DW-1:0]         rd_delay,
  // current bus masters, per tap
  input  logic [1:0]            owner_valid,
  input  logic [1:0][POS_W-1:0] owner,
  // to the delay chains
  output logic [1:0][DW-1:0]    delay_sel,
  output logic [1:0]            adjusting
);

  logic [DW-1:0]      table_q [2][B];
  logic [1:0][POS_W-1:0] last_owner;

  assign rd_delay = table_q[rd_tap][rd_pos];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < 2; t++)
        for (int p = 0; p < int'(B); p++)
          table_q[t][p] <= '0;
    end else if (wr_en) begin
      table_q[wr_tap][wr_pos] <= wr_delay;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      delay_sel  <= '0;
      adjusting  <= '0;
      last_owner <= '0;
    end else begin
      for (int t = 0; t < 2; t++) begin
        adjusting[t] <= 1'b0;
        if (owner_valid[t]) begin
          delay_sel[t]  <= table_q[t][owner[t]];
          last_owner[t] <= owner[t];
          adjusting[t]  <= (owner[t] != last_owner[t]);
        end
      end
    end
  end

endmodule
