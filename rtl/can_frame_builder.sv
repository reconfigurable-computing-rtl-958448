// can_frame_builder: turns an identifier, a DLC and data bytes into a
// complete CAN 2.0A standard data frame.
//
// On start the fixed fields are loaded at once: SOF (0), the 11-bit
// identifier, RTR, IDE and r0 (all 0 for a standard data frame), the DLC and
// the data bytes, every field MSB first, and all bits after the data field
// recessive (1). The CRC-15 is then computed serially, one frame bit per
// clock from SOF to the last data bit, in a can_crc15 instance, and written
// into the CRC field. done pulses for one clock when the frame is complete;
// the build takes crc_start(dlc)+1 clocks after start (20 to 84). frame and
// frame_len hold their value until the next start. Data byte k is data[8k+7:8k].
// The field layout is the CAN 2.0A one; building the CRC ahead of sending,
// before the frame is offered to the bus, follows the node description, and
// the serial timing is this design's choice.
module can_frame_builder
  import can_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [ID_BITS-1:0]    id,
  input  logic [3:0]            dlc,
  input  logic [8*MAX_BYTES-1:0] data,
  output logic                  busy,
  output logic                  done,
  output logic [FRAME_MAX-1:0]  frame,
  output logic [6:0]            frame_len
);

  logic [6:0]  cnt;        // next frame bit fed to the CRC
  logic [6:0]  crc_pos;
  logic [14:0] crc;
  logic        finish;
  logic        feed;

  assign feed = busy && !finish;

  can_crc15 u_crc (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(start),
    .en   (feed),
    .din  (frame[cnt]),
    .crc  (crc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      frame_len <= '0;
      crc_pos   <= '0;
      cnt       <= '0;
      busy      <= 1'b0;
      finish    <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        frame                <= '1;
        frame[POS_SOF]       <= 1'b0;
        for (int i = 0; i < ID_BITS; i++) frame[POS_ID + i] <= id[ID_BITS-1-i];
        frame[POS_RTR]       <= 1'b0;
        frame[POS_IDE]       <= 1'b0;
        frame[POS_R0]        <= 1'b0;
        for (int i = 0; i < 4; i++) frame[POS_DLC + i] <= dlc[3-i];
        for (int k = 0; k < MAX_BYTES; k++)
          if (k < int'(dlc_bytes(dlc)))
            for (int j = 0; j < 8; j++) frame[POS_DATA + 8*k + j] <= data[8*k + 7 - j];
        frame_len <= frame_length(dlc);
        crc_pos   <= crc_start(dlc);
        cnt       <= '0;
        busy      <= 1'b1;
        finish    <= 1'b0;
      end else if (busy) begin
        if (!finish) begin
          cnt <= cnt + 7'd1;
          if (cnt == crc_pos - 7'd1) finish <= 1'b1;
        end else begin
          for (int i = 0; i < CRC_BITS; i++) frame[int'(crc_pos) + i] <= crc[CRC_BITS-1-i];
          busy   <= 1'b0;
          finish <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

endmodule
