// can_crc15: serial CAN CRC-15 register.
//
// Divides the bit stream by x^15+x^14+x^10+x^8+x^7+x^4+x^3+1 (4599h with the
// x^15 term dropped), one bit per clock in which en is high: the incoming bit
// is XORed with register bit 14, the register shifts left, and on a 1 the
// polynomial is XORed in. After the last protected bit, crc holds the CRC
// sequence that is sent MSB first. clear (synchronous, has priority over en)
// zeroes the register at the start of a frame. The algorithm is the standard
// CAN one; the clear/enable interface is this design's.
module can_crc15
  import can_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic        din,
  output logic [14:0] crc
);

  logic crc_nxt;
  assign crc_nxt = din ^ crc[14];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      crc <= '0;
    else if (clear)  crc <= '0;
    else if (en)     crc <= {crc[13:0], 1'b0} ^ (crc_nxt ? CRC_POLY : 15'h0);
  end

endmodule
