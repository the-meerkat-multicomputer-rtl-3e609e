// meerkat_node: the internode side of one Meerkat node.
//
// A node is a processor cluster with memory that taps one horizontal and
// one vertical internode bus. This module is everything of the node that
// the interconnect needs: the bus interface with its two taps and cross
// point switch, the DMA engine that copies packets between node memory and
// the bus, the skew table that sets each tap's receive-clock delay for the
// current bus master, the 32-bit cycle counter and the interrupt
// controller. The processors reach it through a small register port in
// their address space, so every internode operation is a load or a store:
//   0 CMD       write: issue a command (cmd_t); read: last command
//   1 ADDR      DMA word address for the next data-send / data-receive
//   2 STAT_H    tap status of the horizontal tap (tap_status_t)
//   3 STAT_V    tap status of the vertical tap
//   4 DMA_STAT  {rx_count, err, recv_done, send_done, busy}
//   5 CYCLE     cycle counter (write loads it)
//   6 IRQ_PEND  interrupt sources
//   7 IRQ_EN    write {cpu[17:16], mask}; read the four masks, 8 bits each
//   8 SKEW      write {tap[16], pos[15:8], delay[5:0]}; read that entry
// Register reads return data one cycle after the request (reg_rvalid).
// Node memory (DRAM in the prototype) is outside: mem_* is a port with a
// one-cycle read latency that accepts one access per cycle. The delay
// chains are outside too: delay_sel carries their settings.
//
// The block list follows the prototype node (bus interface, interrupt
// controller, 32-bit cycle counter) and the skew table of the proposed
// 100 MHz design. The register map and port timing are this design's own.
module meerkat_node
  import meerkat_pkg::*;
#(
  parameter int unsigned B     = 16,
  parameter int unsigned POS_W = (B > 1) ? $clog2(B) : 1,
  parameter int unsigned AW    = 23,
  parameter int unsigned NCPU  = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [POS_W-1:0]       row,        // position on the vertical bus
  input  logic [POS_W-1:0]       col,        // position on the horizontal bus
  // processor register port
  input  logic                   reg_req,
  input  logic                   reg_we,
  input  logic [3:0]             reg_addr,
  input  logic [WORD_W-1:0]      reg_wdata,
  output logic [WORD_W-1:0]      reg_rdata,
  output logic                   reg_rvalid,
  output logic [NCPU-1:0]        irq,
  input  logic [1:0]             ext_irq,    // S-Bus slots
  // node memory
  output logic                   mem_req,
  output logic                   mem_we,
  output logic [AW-1:0]          mem_addr,
  output logic [WORD_W-1:0]      mem_wdata,
  input  logic [WORD_W-1:0]      mem_rdata,
  // taps: index 0 = horizontal bus, 1 = vertical bus
  input  bus_fwd_t [1:0]         fwd_in,
  input  logic [1:0]             ack_in,
  output bus_fwd_t [1:0]         fwd_out,
  output logic [1:0]             ack_out,
  output logic [1:0]             arb_req,
  output logic [1:0]             arb_rel,
  input  logic [1:0]             arb_gnt,
  input  logic [1:0]             arb_fail,
  input  logic [1:0]             owner_valid,
  input  logic [1:0][POS_W-1:0]  owner,
  // delay chains
  output logic [1:0][DELAY_W-1:0] delay_sel,
  output logic [1:0]             delay_adjusting
);

  localparam int unsigned CW = (NCPU > 1) ? $clog2(NCPU) : 1;

  logic                   wr, rd;
  logic [AW-1:0]          addr_q;
  cmd_t                   last_cmd_q;
  tap_status_t [1:0]      tstat;
  logic                   cmd_err;
  logic                   cmd_valid;

  logic                   dma_send_start, dma_recv_start, dma_clear;
  logic [AW-1:0]          dma_addr;
  logic [CNT_W-1:0]       dma_count;
  logic                   dma_sending, dma_receiving, send_done, recv_done, overflow;
  logic [CNT_W-1:0]       rx_count;
  logic                   tx_valid, tx_last, rx_valid, rx_last;
  logic [WORD_W-1:0]      tx_data, rx_data;

  logic [WORD_W-1:0]      cycles;
  logic [NUM_IRQ-1:0]     irq_src, irq_pend;
  logic [NCPU-1:0][NUM_IRQ-1:0] irq_en;

  tap_e                   skew_tap_q;
  logic [POS_W-1:0]       skew_pos_q;
  logic [DELAY_W-1:0]     skew_rd;

  assign wr        = reg_req && reg_we;
  assign rd        = reg_req && !reg_we;
  assign cmd_valid = wr && reg_addr == REG_CMD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q     <= '0;
      last_cmd_q <= '0;
      skew_tap_q <= TAP_H;
      skew_pos_q <= '0;
    end else if (wr) begin
      if (reg_addr == REG_ADDR) addr_q <= AW'(reg_wdata);
      if (reg_addr == REG_CMD)  last_cmd_q <= cmd_t'(reg_wdata);
      if (reg_addr == REG_SKEW) begin
        skew_tap_q <= tap_e'(reg_wdata[16]);
        skew_pos_q <= POS_W'(reg_wdata[15:8]);
      end
    end
  end

  bus_interface #(.B(B), .POS_W(POS_W), .AW(AW)) u_bif (
    .clk, .rst_n,
    .my_pos     ({row, col}),
    .cmd_valid,
    .cmd        (cmd_t'(reg_wdata)),
    .cmd_addr   (addr_q),
    .status     (tstat),
    .cmd_err,
    .fwd_in, .ack_in, .fwd_out, .ack_out,
    .arb_req, .arb_rel, .arb_gnt, .arb_fail,
    .dma_send_start, .dma_recv_start, .dma_clear, .dma_addr, .dma_count,
    .dma_sending, .dma_receiving,
    .dma_tx_valid (tx_valid), .dma_tx_data (tx_data), .dma_tx_last (tx_last),
    .dma_rx_valid (rx_valid), .dma_rx_data (rx_data), .dma_rx_last (rx_last)
  );

  dma_engine #(.AW(AW)) u_dma (
    .clk, .rst_n,
    .send_start (dma_send_start),
    .recv_start (dma_recv_start),
    .start_addr (dma_addr),
    .send_count (dma_count),
    .clear_done (dma_clear),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .tx_valid, .tx_data, .tx_last,
    .rx_valid, .rx_data, .rx_last,
    .sending    (dma_sending),
    .receiving  (dma_receiving),
    .send_done, .recv_done, .overflow, .rx_count
  );

  skew_table #(.B(B), .POS_W(POS_W), .DW(DELAY_W)) u_skew (
    .clk, .rst_n,
    .wr_en      (wr && reg_addr == REG_SKEW),
    .wr_tap     (tap_e'(reg_wdata[16])),
    .wr_pos     (POS_W'(reg_wdata[15:8])),
    .wr_delay   (reg_wdata[DELAY_W-1:0]),
    .rd_tap     (skew_tap_q),
    .rd_pos     (skew_pos_q),
    .rd_delay   (skew_rd),
    .owner_valid, .owner,
    .delay_sel,
    .adjusting  (delay_adjusting)
  );

  cycle_counter #(.W(WORD_W)) u_cyc (
    .clk, .rst_n,
    .load       (wr && reg_addr == REG_CYCLE),
    .load_value (reg_wdata),
    .count      (cycles)
  );

  always_comb begin
    irq_src                = '0;
    irq_src[IRQ_SIG_H]     = tstat[TAP_H].sig_pending;
    irq_src[IRQ_SIG_V]     = tstat[TAP_V].sig_pending;
    irq_src[IRQ_SEND_DONE] = send_done;
    irq_src[IRQ_RECV_DONE] = recv_done;
    irq_src[IRQ_EXT0]      = ext_irq[0];
    irq_src[IRQ_EXT1]      = ext_irq[1];
  end

  interrupt_controller #(.NSRC(NUM_IRQ), .NCPU(NCPU)) u_irq (
    .clk, .rst_n,
    .src      (irq_src),
    .en_we    (wr && reg_addr == REG_IRQ_EN),
    .en_cpu   (CW'(reg_wdata[17:16])),
    .en_value (reg_wdata[NUM_IRQ-1:0]),
    .enable   (irq_en),
    .pending  (irq_pend),
    .irq
  );

  // Register read-back, one cycle after the request.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_rdata  <= '0;
      reg_rvalid <= 1'b0;
    end else begin
      reg_rvalid <= rd;
      if (rd) begin
        unique case (reg_addr)
          REG_CMD:      reg_rdata <= WORD_W'(last_cmd_q);
          REG_ADDR:     reg_rdata <= WORD_W'(addr_q);
          REG_STAT_H:   reg_rdata <= WORD_W'(tstat[TAP_H]);
          REG_STAT_V:   reg_rdata <= WORD_W'(tstat[TAP_V]);
          REG_DMA_STAT: reg_rdata <= WORD_W'(dma_status_t'{
                                       rx_count:  rx_count,
                                       err:       cmd_err | overflow,
                                       recv_done: recv_done,
                                       send_done: send_done,
                                       busy:      dma_sending | dma_receiving});
          REG_CYCLE:    reg_rdata <= cycles;
          REG_IRQ_PEND: reg_rdata <= WORD_W'(irq_pend);
          REG_IRQ_EN: begin
            reg_rdata <= '0;
            for (int c = 0; c < int'(NCPU) && c < 4; c++)
              reg_rdata[8*c +: 8] <= 8'(irq_en[c]);
          end
          REG_SKEW:     reg_rdata <= WORD_W'(skew_rd);
          default:      reg_rdata <= '0;
        endcase
      end
    end
  end

endmodule
