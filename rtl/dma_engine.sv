// dma_engine: memory side of the bus interface, one word per clock.
//
// The bus interface copies packets straight between node memory and the
// internode bus, so the processor does not move data itself. For a
// data-send the engine reads `count` consecutive words starting at the
// given word address, one read per cycle, and hands each word to the bus
// interface one cycle after the read (memory has a fixed one-cycle read
// latency), flagging the last one. For a data-receive it writes each word
// that arrives to consecutive addresses from the buffer address, in the
// cycle it arrives, until the word marked last; the number of words
// received is kept in rx_count. There is no buffer anywhere on the path and
// no flow control: the node memory port is assumed to give the engine one
// access every cycle, which is what lets the interconnect run at one word
// per clock. A packet is at most MAX_PKT words; words past that are
// dropped and flagged. One packet is in progress at a time. Because
// nothing is buffered, mem_wdata is the received word itself and tx_data
// is the memory's read data: both pass straight through.
//
// Word-per-clock copying between memory and the bus and the 1024-word
// packet limit follow the Meerkat architecture; the memory port timing, the single
// engine per node and the done/err flags are this design's choices.
module dma_engine
  import meerkat_pkg::*;
#(
  parameter int unsigned AW = 23  // word address: 32 MB of node memory
) (
  input  logic              clk,
  input  logic              rst_n,
  // commands
  input  logic              send_start,
  input  logic              recv_start,
  input  logic [AW-1:0]     start_addr,
  input  logic [CNT_W-1:0]  send_count,
  input  logic              clear_done,
  // node memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [AW-1:0]     mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  input  logic [WORD_W-1:0] mem_rdata,
  // words to send
  output logic              tx_valid,
  output logic [WORD_W-1:0] tx_data,
  output logic              tx_last,
  // words received
  input  logic              rx_valid,
  input  logic [WORD_W-1:0] rx_data,
  input  logic              rx_last,
  // status
  output logic              sending,
  output logic              receiving,
  output logic              send_done,
  output logic              recv_done,
  output logic              overflow,
  output logic [CNT_W-1:0]  rx_count
);

  logic [AW-1:0]    base;
  logic [CNT_W-1:0] idx;
  logic [CNT_W-1:0] last_idx;
  logic             issuing;
  logic             rd_valid_q, rd_last_q;

  // Memory port: reads while issuing a send, writes as words arrive.
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = base + AW'(idx);
    mem_wdata = rx_data;
    if (issuing) begin
      mem_req = 1'b1;
    end else if (receiving && rx_valid && idx < CNT_W'(MAX_PKT)) begin
      mem_req = 1'b1;
      mem_we  = 1'b1;
    end
  end

  assign tx_valid = rd_valid_q;
  assign tx_data  = mem_rdata;
  assign tx_last  = rd_last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base       <= '0;
      idx        <= '0;
      last_idx   <= '0;
      issuing    <= 1'b0;
      sending    <= 1'b0;
      receiving  <= 1'b0;
      send_done  <= 1'b0;
      recv_done  <= 1'b0;
      overflow   <= 1'b0;
      rx_count   <= '0;
      rd_valid_q <= 1'b0;
      rd_last_q  <= 1'b0;
    end else begin
      rd_valid_q <= issuing;
      rd_last_q  <= issuing && (idx == last_idx);
      if (clear_done) begin
        send_done <= 1'b0;
        recv_done <= 1'b0;
        overflow  <= 1'b0;
      end
      if (send_start && !sending && !receiving && send_count != '0) begin
        base      <= start_addr;
        idx       <= '0;
        last_idx  <= send_count - 1'b1;
        issuing   <= 1'b1;
        sending   <= 1'b1;
        send_done <= 1'b0;
      end else if (recv_start && !sending && !receiving) begin
        base      <= start_addr;
        idx       <= '0;
        receiving <= 1'b1;
        recv_done <= 1'b0;
        overflow  <= 1'b0;
      end else begin
        if (issuing) begin
          if (idx == last_idx) issuing <= 1'b0;
          else                 idx     <= idx + 1'b1;
        end
        if (sending && rd_last_q) begin
          sending   <= 1'b0;
          send_done <= 1'b1;
        end
        if (receiving && rx_valid) begin
          if (idx < CNT_W'(MAX_PKT)) idx <= idx + 1'b1;
          else                       overflow <= 1'b1;
          if (rx_last) begin
            receiving <= 1'b0;
            recv_done <= 1'b1;
            rx_count  <= (idx < CNT_W'(MAX_PKT)) ? idx + 1'b1 : idx;
          end
        end
      end
    end
  end

  a_one_job: assert property (@(posedge clk) disable iff (!rst_n) !(sending && receiving))
    else $error("dma_engine: send and receive at once");

endmodule
