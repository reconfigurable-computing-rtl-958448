// can_host_if: FPGA side of the link to the host (application layer).
//
// The host link consists of two flags and two byte channels. gpo is the
// host's "I have a message" flag and gpi the FPGA's. The control channel
// (ctrl_valid/ctrl_data/ctrl_ready) carries bytes from host to FPGA, the
// status channel (stat_valid/stat_data/stat_ready) bytes from FPGA to host;
// a byte moves in the clock where valid and ready are both high, and either
// side simply waits until the other is ready, like the blocking byte calls of
// the board.
//
// Host to FPGA: with gpo high the host sends the message type; for DATA and
// STATUSREQ it then sends an item count and that many items, which land in
// the twelve-byte message buffer (node number, message id, data length,
// data 0..7). Every byte received is acknowledged by echoing it on the status
// channel. The message then takes effect: DATA asks node <byte 0> to send a
// frame with identifier {3'b000, byte 1} and DLC byte 2; TRACEON/TRACEOFF
// switch trace mode; ENDPRG halts the network; TEST and STATUSREQ only
// acknowledge. Any message marks the network started and, in trace mode,
// releases one bus bit (step). The interface then waits for gpo to drop.
//
// FPGA to host: when a node holds a received frame (lowest node first) and
// the host is not sending, the frame is loaded into the message buffer, gpi
// rises and the FPGA sends the type DATA, the count 3+bytes and the items
// node, id[7:0], DLC, data; it then waits for the host's OK byte, releases
// the node's frame (rx_ack) and lowers gpi.
//
// host_busy is high while a host message is coming in, so the bit sequencer
// can wait as the main loop does. Follows the description: the flag/byte
// handshakes, the length-first message order, the buffer layout, the message
// types and the dropping of the three top identifier bits. This design's
// choices: type codes 2, 3 and 4, the echo acknowledgement, and that a DATA
// request for a node that is still busy with a frame, or for a node number
// that does not exist, is dropped (req_dropped pulses).
module can_host_if
  import can_pkg::*;
#(
  parameter int unsigned NODES     = 3,
  parameter int unsigned BUF_WORDS = 12
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // host link
  input  logic                              gpo,
  output logic                              gpi,
  input  logic                              ctrl_valid,
  input  logic [7:0]                        ctrl_data,
  output logic                              ctrl_ready,
  output logic                              stat_valid,
  output logic [7:0]                        stat_data,
  input  logic                              stat_ready,
  // node requests
  output logic [NODES-1:0]                  tx_req,
  output logic [ID_BITS-1:0]                tx_id,
  output logic [3:0]                        tx_dlc,
  output logic [8*MAX_BYTES-1:0]            tx_data,
  input  logic [NODES-1:0]                  tx_busy,
  // received frames
  input  logic [NODES-1:0]                  rx_valid,
  input  logic [NODES-1:0][ID_BITS-1:0]     rx_id,
  input  logic [NODES-1:0][3:0]             rx_dlc,
  input  logic [NODES-1:0][8*MAX_BYTES-1:0] rx_data,
  output logic [NODES-1:0]                  rx_ack,
  // control of the main loop
  output logic                              host_busy,
  output logic                              started,
  output logic                              halted,
  output logic                              trace,
  output logic                              step,
  output logic                              req_dropped
);

  typedef enum logic [3:0] {
    H_IDLE, H_TYPE, H_TYPE_ACK, H_CNT, H_CNT_ACK, H_ITEM, H_ITEM_ACK,
    H_DISPATCH, H_WAIT_LOW, O_TYPE, O_CNT, O_ITEM, O_OK
  } host_state_e;

  localparam int unsigned NW = (NODES > 1) ? $clog2(NODES) : 1;

  host_state_e                state;
  logic [7:0]                 msg_type;
  logic [7:0]                 count;
  logic [7:0]                 idx;
  logic [7:0]                 ack_byte;
  logic [NW-1:0]              sel;
  logic [BUF_WORDS-1:0][7:0]  words;
  logic                       buf_we, buf_load;
  logic [BUF_WORDS-1:0][7:0]  load_words;
  logic                       any_rx;
  logic [NW-1:0]              first_rx;

  can_msg_buffer #(.WORDS(BUF_WORDS)) u_buf (
    .clk       (clk),
    .rst_n     (rst_n),
    .we        (buf_we),
    .waddr     (idx[3:0]),
    .wdata     (ctrl_data),
    .load      (buf_load),
    .load_words(load_words),
    .words     (words)
  );

  // lowest-numbered node with a frame for the host
  always_comb begin
    any_rx   = |rx_valid;
    first_rx = '0;
    for (int n = NODES-1; n >= 0; n--)
      if (rx_valid[n]) first_rx = NW'(n);
  end

  always_comb begin
    load_words    = '0;
    load_words[0] = 8'(first_rx);
    load_words[1] = rx_id[first_rx][7:0];
    load_words[2] = {4'd0, rx_dlc[first_rx]};
    for (int k = 0; k < MAX_BYTES; k++)
      if (3 + k < BUF_WORDS) load_words[3 + k] = rx_data[first_rx][8*k +: 8];
  end

  // handshakes
  always_comb begin
    ctrl_ready = (state == H_TYPE) || (state == H_CNT) || (state == H_ITEM) || (state == O_OK);
    stat_valid = (state == H_TYPE_ACK) || (state == H_CNT_ACK) || (state == H_ITEM_ACK) ||
                 (state == O_TYPE) || (state == O_CNT) || (state == O_ITEM);
    unique case (state)
      O_TYPE:  stat_data = MSG_DATA;
      O_CNT:   stat_data = count;
      O_ITEM:  stat_data = words[idx[3:0]];
      default: stat_data = ack_byte;
    endcase
    gpi       = (state == O_TYPE) || (state == O_CNT) || (state == O_ITEM) || (state == O_OK);
    host_busy = (state == H_IDLE && gpo) || (state == H_TYPE) || (state == H_TYPE_ACK) ||
                (state == H_CNT) || (state == H_CNT_ACK) || (state == H_ITEM) || (state == H_ITEM_ACK);
    buf_we    = (state == H_ITEM) && ctrl_valid && (32'(idx) < BUF_WORDS);
    buf_load  = (state == H_IDLE) && !gpo && any_rx;
    rx_ack    = '0;
    if (state == O_OK && ctrl_valid) rx_ack[sel] = 1'b1;
  end

  // request to a node, formed from the message buffer
  always_comb begin
    tx_id   = {3'b000, words[1]};
    tx_dlc  = words[2][3:0];
    tx_data = '0;
    for (int k = 0; k < MAX_BYTES; k++)
      if (3 + k < BUF_WORDS) tx_data[8*k +: 8] = words[3 + k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= H_IDLE;
      msg_type    <= '0;
      count       <= '0;
      idx         <= '0;
      ack_byte    <= '0;
      sel         <= '0;
      started     <= 1'b0;
      halted      <= 1'b0;
      trace       <= 1'b0;
      step        <= 1'b0;
      tx_req      <= '0;
      req_dropped <= 1'b0;
    end else begin
      step        <= 1'b0;
      tx_req      <= '0;
      req_dropped <= 1'b0;
      unique case (state)
        H_IDLE: begin
          if (gpo) state <= H_TYPE;
          else if (any_rx) begin
            sel   <= first_rx;
            count <= 8'd3 + {4'd0, dlc_bytes(rx_dlc[first_rx])};
            state <= O_TYPE;
          end
        end
        H_TYPE: if (ctrl_valid) begin
          msg_type <= ctrl_data;
          ack_byte <= ctrl_data;
          state    <= H_TYPE_ACK;
        end
        H_TYPE_ACK: if (stat_ready)
          state <= (msg_type == MSG_DATA || msg_type == MSG_STATUSREQ) ? H_CNT : H_DISPATCH;
        H_CNT: if (ctrl_valid) begin
          count    <= ctrl_data;
          ack_byte <= ctrl_data;
          state    <= H_CNT_ACK;
        end
        H_CNT_ACK: if (stat_ready) begin
          idx   <= '0;
          state <= (count == 8'd0) ? H_DISPATCH : H_ITEM;
        end
        H_ITEM: if (ctrl_valid) begin
          ack_byte <= ctrl_data;
          state    <= H_ITEM_ACK;
        end
        H_ITEM_ACK: if (stat_ready) begin
          idx   <= idx + 8'd1;
          state <= (idx + 8'd1 == count) ? H_DISPATCH : H_ITEM;
        end
        H_DISPATCH: begin
          started <= 1'b1;
          step    <= 1'b1;
          unique case (msg_type)
            MSG_DATA:
              if (32'(words[0]) < NODES && !tx_busy[words[0][NW-1:0]])
                tx_req[words[0][NW-1:0]] <= 1'b1;
              else
                req_dropped <= 1'b1;
            MSG_TRACEON:  trace  <= 1'b1;
            MSG_TRACEOFF: trace  <= 1'b0;
            MSG_ENDPRG:   halted <= 1'b1;
            default: ;
          endcase
          state <= H_WAIT_LOW;
        end
        H_WAIT_LOW: if (!gpo) state <= H_IDLE;
        O_TYPE: if (stat_ready) state <= O_CNT;
        O_CNT: if (stat_ready) begin
          idx   <= '0;
          state <= O_ITEM;
        end
        O_ITEM: if (stat_ready) begin
          idx   <= idx + 8'd1;
          if (idx + 8'd1 == count) state <= O_OK;
        end
        O_OK: if (ctrl_valid) state <= H_IDLE;
        default: state <= H_IDLE;
      endcase
    end
  end

endmodule
