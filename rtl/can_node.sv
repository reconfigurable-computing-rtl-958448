// can_node: one CAN 2.0A controller node (data link layer) on the emulated bus.
//
// A node has four modes. IDLE: nothing to send; in its read slot it watches
// the bus for a start of frame, i.e. a dominant bit after at least
// IDLE_THRESHOLD recessive bits, and then becomes a RECEIVE node. SEND: it
// writes its frame one bit per write slot and reads every bit back. WAIT: it
// has a frame to send (newly requested, or after lost arbitration, a bit
// error or no ACK); it keeps receiving the current frame and, once
// IDLE_THRESHOLD recessive bits show the bus is free, goes to SEND.
//
// Bit stream handling is shared by sender and receivers: the read slot
// de-stuffs the bus (after STUFF_LIMIT equal bits from SOF to the end of the
// CRC sequence the next bit is a stuff bit and is dropped), stores the frame
// bit, feeds the receive CRC, learns the frame length from the DLC and ends
// the frame after its last EOF/IFS bit. The write slot puts on the bus the
// sender's next frame bit or the stuff bit it owes, or, for a receiver at
// the ACK slot with a matching CRC, a dominant ACK. A sender whose read-back
// differs from its written bit inside the identifier or RTR bit has lost
// arbitration and turns to WAIT; elsewhere (except the ACK slot) that is a
// bit error and it aborts to WAIT. A frame received with a good CRC is
// offered on rx_* with rx_valid until rx_ack; the sender does not receive
// its own frame.
//
// Interface and timing: tx_req (while tx_busy is low) loads an id/DLC/data
// into the frame builder, which needs up to 84 clocks before the frame is
// pending. wr_bit is combinational and is taken by the bus in the clock where
// wr_en is high; bus_in is sampled in the clock where rd_en is high. evt holds
// one-clock event pulses.
//
// Follows the description: the modes and what each does per slot, bit
// stuffing and de-stuffing, arbitration by read-back, the 10-bit idle
// threshold and SOF pattern, ACK by receivers after a CRC check. This
// design's choices: a node that lost arbitration acknowledges the frame it
// is receiving, a stuff error or bit error abandons the frame, no error or
// overload frames are sent, and sender and receivers share one de-stuffing
// bit counter.
module can_node
  import can_pkg::*;
#(
  parameter int unsigned STUFF_LIMIT    = 5,
  parameter int unsigned IDLE_THRESHOLD = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // frame request from the host side
  input  logic                   tx_req,
  input  logic [ID_BITS-1:0]     tx_id,
  input  logic [3:0]             tx_dlc,
  input  logic [8*MAX_BYTES-1:0] tx_data,
  output logic                   tx_busy,
  // bus slots
  input  logic                   wr_en,
  output logic                   wr_bit,
  input  logic                   rd_en,
  input  logic                   bus_in,
  // received frame
  output logic                   rx_valid,
  output logic [ID_BITS-1:0]     rx_id,
  output logic [3:0]             rx_dlc,
  output logic [8*MAX_BYTES-1:0] rx_data,
  input  logic                   rx_ack,
  // status
  output node_mode_e             mode,
  output logic [7:0]             bit_count,
  output logic                   last_wr,
  output logic                   last_rd,
  output node_evt_t              evt
);

  // ---------------------------------------------------------------- transmit frame
  logic                 bld_busy, bld_done;
  logic [FRAME_MAX-1:0] tx_frame;
  logic                 tx_pending;
  logic [6:0]           tx_len;

  can_frame_builder u_builder (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (tx_req && !tx_busy),
    .id       (tx_id),
    .dlc      (tx_dlc),
    .data     (tx_data),
    .busy     (bld_busy),
    .done     (bld_done),
    .frame    (tx_frame),
    .frame_len(tx_len)
  );

  assign tx_busy = bld_busy || tx_pending;

  // ---------------------------------------------------------------- frame state
  logic                 in_frame;
  logic [6:0]           pos;          // next de-stuffed frame bit to be read
  logic [FRAME_MAX-1:0] rx_frame;
  logic [6:0]           rx_len;
  logic [4:0]           stuff_cnt;
  logic                 stuff_last;
  logic                 stuff_next;   // next bus bit is a stuff bit
  logic [4:0]           idle_cnt;     // consecutive recessive bits, saturating
  logic                 wrote;        // bit this node wrote in the current bit time
  logic                 ack_seen;
  logic                 crc_good;

  logic [3:0]  cur_dlc;
  logic [6:0]  cur_crc_pos, cur_ack_pos;
  logic [14:0] rx_crc, rx_crc_field;
  logic        crc_match;

  assign cur_dlc     = {rx_frame[POS_DLC], rx_frame[POS_DLC+1], rx_frame[POS_DLC+2], rx_frame[POS_DLC+3]};
  assign cur_crc_pos = crc_start(cur_dlc);
  assign cur_ack_pos = ack_slot(cur_dlc);

  always_comb begin
    for (int i = 0; i < CRC_BITS; i++)
      rx_crc_field[CRC_BITS-1-i] = rx_frame[int'(cur_crc_pos) + i];
  end
  assign crc_match = (rx_crc == rx_crc_field);

  can_crc15 u_rx_crc (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(!in_frame),
    .en   (rd_en && in_frame && !stuff_next && (pos < cur_crc_pos)),
    .din  (bus_in),
    .crc  (rx_crc)
  );

  // ---------------------------------------------------------------- write slot
  always_comb begin
    wr_bit = 1'b1;
    if (in_frame) begin
      if (mode == MODE_SEND)
        wr_bit = stuff_next ? ~stuff_last : tx_frame[pos];
      else if (!stuff_next && pos == cur_ack_pos && crc_match)
        wr_bit = 1'b0;
    end
  end

  assign bit_count = {1'b0, pos};

  // ---------------------------------------------------------------- read slot
  // Next-state helpers for the bit read in this slot.
  logic       b;          // bus level read
  logic [4:0] idle_n;     // recessive run including this bit
  logic [4:0] cnt_n;      // equal-bit run including this bit
  logic [6:0] len_n;      // frame length, known once the DLC is complete
  logic       seen_n;     // sender has seen a dominant ACK

  always_comb begin
    b      = bus_in;
    idle_n = b ? ((32'(idle_cnt) >= IDLE_THRESHOLD) ? idle_cnt : idle_cnt + 5'd1) : 5'd0;
    cnt_n  = (b == stuff_last) ? stuff_cnt + 5'd1 : 5'd1;
    len_n  = (pos == 7'(POS_DATA - 1))
           ? frame_length({rx_frame[POS_DLC], rx_frame[POS_DLC+1], rx_frame[POS_DLC+2], b})
           : rx_len;
    seen_n = ack_seen || (mode == MODE_SEND && b != wrote && pos == cur_ack_pos);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= MODE_IDLE;
      tx_pending <= 1'b0;
      in_frame   <= 1'b0;
      pos        <= '0;
      rx_frame   <= '1;
      rx_len     <= 7'(FRAME_MAX);
      stuff_cnt  <= '0;
      stuff_last <= 1'b1;
      stuff_next <= 1'b0;
      idle_cnt   <= '0;
      wrote      <= 1'b1;
      ack_seen   <= 1'b0;
      crc_good   <= 1'b0;
      last_wr    <= 1'b1;
      last_rd    <= 1'b1;
      rx_valid   <= 1'b0;
      rx_id      <= '0;
      rx_dlc     <= '0;
      rx_data    <= '0;
      evt        <= '0;
    end else begin
      evt <= '0;
      if (bld_done) tx_pending <= 1'b1;
      if (rx_ack)   rx_valid   <= 1'b0;

      if (wr_en) begin
        wrote   <= wr_bit;
        last_wr <= wr_bit;
        if (in_frame && mode != MODE_SEND && !wr_bit) evt.ack_sent <= 1'b1;
      end

      if (rd_en) begin
        last_rd  <= b;
        idle_cnt <= idle_n;

        if (!in_frame) begin
          if (!b && 32'(idle_cnt) >= IDLE_THRESHOLD) begin
            // start of frame from another node: SOF already counts as bit 0
            in_frame   <= 1'b1;
            mode       <= MODE_RECEIVE;
            rx_frame[POS_SOF] <= 1'b0;
            pos        <= 7'd1;
            rx_len     <= 7'(FRAME_MAX);
            stuff_cnt  <= 5'd1;
            stuff_last <= 1'b0;
            stuff_next <= 1'b0;
            crc_good   <= 1'b0;
            evt.sof    <= 1'b1;
          end else if (b && 32'(idle_n) >= IDLE_THRESHOLD && tx_pending) begin
            // bus free: send from the next write slot on
            in_frame   <= 1'b1;
            mode       <= MODE_SEND;
            pos        <= '0;
            rx_len     <= 7'(FRAME_MAX);
            stuff_cnt  <= '0;
            stuff_last <= 1'b1;
            stuff_next <= 1'b0;
            ack_seen   <= 1'b0;
          end else if (tx_pending) begin
            mode       <= MODE_WAIT;      // frame ready, bus not yet free
          end
        end else if (stuff_next) begin
          // stuff bit: checked and dropped
          evt.stuff_bit <= 1'b1;
          stuff_next    <= 1'b0;
          stuff_cnt     <= 5'd1;
          stuff_last    <= b;
          if (mode == MODE_SEND && b != wrote) begin
            in_frame <= (pos <= 7'(POS_RTR));
            mode     <= MODE_WAIT;
            if (pos <= 7'(POS_RTR)) evt.arb_lost <= 1'b1;
            else                    evt.bit_err  <= 1'b1;
          end else if (b == stuff_last) begin
            evt.stuff_err <= 1'b1;
            in_frame      <= 1'b0;
            mode          <= tx_pending ? MODE_WAIT : MODE_IDLE;
          end
        end else begin
          // frame bit
          rx_frame[pos] <= b;
          if (pos < cur_crc_pos + 7'(CRC_BITS)) begin
            stuff_cnt  <= cnt_n;
            stuff_last <= b;
            stuff_next <= (32'(cnt_n) == STUFF_LIMIT);
          end
          if (pos == 7'(POS_DATA - 1)) rx_len <= len_n;
          if (pos == cur_ack_pos && mode != MODE_SEND) begin
            crc_good <= crc_match;
            if (!crc_match) evt.crc_err <= 1'b1;
          end
          pos      <= pos + 7'd1;
          ack_seen <= seen_n;

          if (mode == MODE_SEND && b != wrote && pos != cur_ack_pos) begin
            if (pos >= 7'(POS_ID) && pos <= 7'(POS_RTR) && wrote) begin
              mode         <= MODE_WAIT;       // lost arbitration: now a receiver
              evt.arb_lost <= 1'b1;
            end else begin
              mode        <= MODE_WAIT;        // bit error: give up this attempt
              in_frame    <= 1'b0;
              evt.bit_err <= 1'b1;
            end
          end else if (pos == len_n - 7'd1) begin
            // last bit of the frame
            in_frame <= 1'b0;
            if (mode == MODE_SEND) begin
              if (seen_n) begin
                tx_pending  <= 1'b0;
                mode        <= MODE_IDLE;
                evt.tx_done <= 1'b1;
              end else begin
                mode        <= MODE_WAIT;
                evt.ack_err <= 1'b1;
              end
            end else begin
              mode <= tx_pending ? MODE_WAIT : MODE_IDLE;
              if (crc_good) begin
                rx_valid    <= 1'b1;
                for (int i = 0; i < ID_BITS; i++) rx_id[ID_BITS-1-i] <= rx_frame[POS_ID + i];
                rx_dlc      <= cur_dlc;
                rx_data     <= '0;
                for (int k = 0; k < MAX_BYTES; k++)
                  if (k < int'(dlc_bytes(cur_dlc)))
                    for (int j = 0; j < 8; j++) rx_data[8*k + 7 - j] <= rx_frame[POS_DATA + 8*k + j];
                evt.rx_done <= 1'b1;
              end
            end
          end
        end
      end
    end
  end

  // A sender reads its own frame back, so the length it learns from the DLC
  // on the bus must be the length of the frame it built.
  a_tx_len: assert property (@(posedge clk) disable iff (!rst_n)
    (in_frame && mode == MODE_SEND && pos > 7'(POS_DATA)) |-> rx_len == tx_len);

endmodule
