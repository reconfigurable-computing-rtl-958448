// can_pkg: types and constants shared by the CAN network blocks.
//
// The network carries CAN 2.0A standard data frames. A frame is held as a
// bit vector whose index is the bit's position on the bus, index 0 being the
// start-of-frame bit; every multi-bit field is sent most significant bit
// first. Field widths follow the standard frame layout (SOF 1, identifier 11,
// RTR 1, IDE 1, r0 1, DLC 4, data 0..8 bytes, CRC 15 plus delimiter, ACK slot
// and delimiter, then 10 recessive bits of end-of-frame and interframe space).
// The mode encoding, the host message type codes other than TEST, DATA and
// STATUSREQ, and the event flags are this design's own choices.
package can_pkg;

  localparam int unsigned ID_BITS     = 11;
  localparam int unsigned POS_SOF     = 0;
  localparam int unsigned POS_ID      = 1;
  localparam int unsigned POS_RTR     = 12;
  localparam int unsigned POS_IDE     = 13;
  localparam int unsigned POS_R0      = 14;
  localparam int unsigned POS_DLC     = 15;
  localparam int unsigned POS_DATA    = 19;   // first data bit, end of control field
  localparam int unsigned CRC_BITS    = 15;
  localparam int unsigned EOF_IFS     = 10;   // recessive bits closing a frame
  // bits after the data field: CRC, CRC delimiter, ACK slot, ACK delimiter, EOF+IFS
  localparam int unsigned TAIL_BITS   = CRC_BITS + 1 + 2 + EOF_IFS;
  localparam int unsigned MAX_BYTES   = 8;
  localparam int unsigned FRAME_MAX   = POS_DATA + 8*MAX_BYTES + TAIL_BITS;  // 111
  localparam logic [14:0] CRC_POLY    = 15'h4599;

  // Host message types (first byte of every host message).
  localparam logic [7:0] MSG_TEST      = 8'd0;
  localparam logic [7:0] MSG_DATA      = 8'd1;
  localparam logic [7:0] MSG_TRACEON   = 8'd2;
  localparam logic [7:0] MSG_TRACEOFF  = 8'd3;
  localparam logic [7:0] MSG_ENDPRG    = 8'd4;
  localparam logic [7:0] MSG_STATUSREQ = 8'd5;

  typedef enum logic [1:0] {
    MODE_IDLE    = 2'd0,
    MODE_RECEIVE = 2'd1,
    MODE_SEND    = 2'd2,
    MODE_WAIT    = 2'd3
  } node_mode_e;

  // One-cycle event flags of a node. ack_sent is raised in its write slot,
  // all others in its read slot.
  typedef struct packed {
    logic sof;        // start of frame seen by an idle node
    logic stuff_bit;  // a stuff bit was removed
    logic arb_lost;   // lost arbitration, now receiving
    logic bit_err;    // read-back differs outside arbitration and ACK slot
    logic stuff_err;  // stuff bit had the wrong level
    logic crc_err;    // received CRC does not match
    logic ack_sent;   // this node wrote a dominant ACK
    logic ack_err;    // sender saw no ACK
    logic tx_done;    // frame sent and acknowledged
    logic rx_done;    // frame received with good CRC
  } node_evt_t;

  // Number of data bytes a DLC stands for (codes above 8 mean 8).
  function automatic logic [3:0] dlc_bytes(input logic [3:0] dlc);
    return (dlc > 4'd8) ? 4'd8 : dlc;
  endfunction

  // Position of the first CRC bit; everything before it is CRC-protected.
  function automatic logic [6:0] crc_start(input logic [3:0] dlc);
    return 7'(POS_DATA) + {dlc_bytes(dlc), 3'b000};
  endfunction

  function automatic logic [6:0] frame_length(input logic [3:0] dlc);
    return crc_start(dlc) + 7'(TAIL_BITS);
  endfunction

  // ACK slot: after the CRC sequence and the CRC delimiter.
  function automatic logic [6:0] ack_slot(input logic [3:0] dlc);
    return crc_start(dlc) + 7'(CRC_BITS + 1);
  endfunction

endpackage
