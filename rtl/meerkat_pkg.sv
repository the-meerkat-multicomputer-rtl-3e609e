// meerkat_pkg: types and constants shared by the Meerkat internode logic.
//
// An internode bus is 36 lines wide, the width of the four 9-bit
// transceivers of a node's data switch: 32 data lines plus 3 lines that
// say what the word is (bus_type_e) in the direction from the bus owner,
// and one acknowledge line in the reverse direction. The 32-bit data path
// and the word-per-clock transfer follow the prototype; the use of the four
// remaining lines, the command codes and the register map are this
// design's own choices.
package meerkat_pkg;

  localparam int unsigned WORD_W      = 32;   // internode bus is four bytes wide
  localparam int unsigned POS_FIELD_W = 8;    // node position field in bus words
  localparam int unsigned MAX_PKT     = 1024; // maximum packet length in words
  localparam int unsigned CNT_W       = 11;   // holds 1..MAX_PKT
  localparam int unsigned DELAY_W     = 6;    // skew table entry width

  // Tap numbering inside a node.
  typedef enum logic {TAP_H = 1'b0, TAP_V = 1'b1} tap_e;

  // What the owner side of a bus is driving this cycle.
  typedef enum logic [2:0] {
    BT_IDLE    = 3'd0,
    BT_XREQ    = 3'd1,  // ask node data[7:0] to become a cross point
    BT_SIGNAL  = 3'd2,  // alert node data[7:0]; data[8] = still on first bus
    BT_DATA    = 3'd3,  // packet word
    BT_LAST    = 3'd4,  // last packet word
    BT_RELEASE = 3'd5   // connection is being torn down
  } bus_type_e;

  typedef struct packed {
    bus_type_e         typ;
    logic [WORD_W-1:0] data;
  } bus_fwd_t;

  localparam bus_fwd_t BUS_IDLE = '{typ: BT_IDLE, data: '0};

  // Processor commands to the bus interface.
  typedef enum logic [2:0] {
    OP_NOP     = 3'd0,
    OP_ARB     = 3'd1,
    OP_SIGNAL  = 3'd2,
    OP_SEND    = 3'd3,
    OP_RECV    = 3'd4,
    OP_RELEASE = 3'd5
  } op_e;

  // Command register layout (register CMD).
  typedef struct packed {
    logic [CNT_W-1:0]       count;   // [31:21] data-send length in words
    logic [4:0]             rsvd;    // [20:16]
    logic [POS_FIELD_W-1:0] pos;     // [15:8]  cross point or receiver position
    logic [2:0]             rsvd2;   // [7:5]
    logic                   two_bus; // [4]     arbitrate: 2-bus connection
    tap_e                   tap;     // [3]
    op_e                    op;      // [2:0]
  } cmd_t;

  // Per-tap status bits (registers STAT_H / STAT_V).
  typedef struct packed {
    logic xpoint;      // [9] this node is a cross point through this tap
    logic receptive;   // [8] data-receive issued, waiting for / taking data
    logic sig_pending; // [7] a sender has signalled this node on this tap
    logic rx_ready;    // [6] the receiver has become receptive
    logic sig_sent;    // [5] a signal was sent and not yet answered
    logic two_bus;     // [4] connection uses a cross point
    logic arb_fail;    // [3] last arbitration failed
    logic arb_busy;    // [2] arbitration in progress
    logic owned;       // [1] connection established, tap is active
    logic settle;      // [0] first cycle after a grant
  } tap_status_t;

  // DMA status (register DMA_STAT).
  typedef struct packed {
    logic [CNT_W-1:0] rx_count;  // [14:4] words in the last packet received
    logic             err;       // [3] command refused
    logic             recv_done; // [2]
    logic             send_done; // [1]
    logic             busy;      // [0]
  } dma_status_t;

  // Word addresses of the node registers.
  localparam logic [3:0] REG_CMD      = 4'd0;
  localparam logic [3:0] REG_ADDR     = 4'd1;
  localparam logic [3:0] REG_STAT_H   = 4'd2;
  localparam logic [3:0] REG_STAT_V   = 4'd3;
  localparam logic [3:0] REG_DMA_STAT = 4'd4;
  localparam logic [3:0] REG_CYCLE    = 4'd5;
  localparam logic [3:0] REG_IRQ_PEND = 4'd6;
  localparam logic [3:0] REG_IRQ_EN   = 4'd7;
  localparam logic [3:0] REG_SKEW     = 4'd8;

  // Interrupt sources of a node.
  localparam int unsigned IRQ_SIG_H     = 0;
  localparam int unsigned IRQ_SIG_V     = 1;
  localparam int unsigned IRQ_SEND_DONE = 2;
  localparam int unsigned IRQ_RECV_DONE = 3;
  localparam int unsigned IRQ_EXT0      = 4; // S-Bus slot 0
  localparam int unsigned IRQ_EXT1      = 5; // S-Bus slot 1
  localparam int unsigned NUM_IRQ       = 6;

endpackage
