// can_status_buffer: per-node status record, refreshed after every bit cycle.
//
// Holds four bytes per node: mode, bit count, last written bit and last read
// bit, node 0 at bytes 0..3, node 1 at 4..7 and so on (12 bytes for three
// nodes). While we is high the whole record is captured from the nodes in
// one clock. The host side reads it at any time through raddr/rdata
// (combinational read), standing in for the on-board memory bank the host
// reads without stopping the nodes; addresses past the record read 0. The
// record layout is the described one; the mode codes (0 idle, 1 receive,
// 2 send, 3 wait) are this design's.
module can_status_buffer #(
  parameter int unsigned NODES = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [NODES-1:0][1:0] mode,
  input  logic [NODES-1:0][7:0] bit_count,
  input  logic [NODES-1:0]     wr_bit,
  input  logic [NODES-1:0]     rd_bit,
  input  logic [7:0]           raddr,
  output logic [7:0]           rdata
);

  logic [4*NODES-1:0][7:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem <= '0;
    else if (we) begin
      for (int n = 0; n < NODES; n++) begin
        mem[4*n + 0] <= {6'd0, mode[n]};
        mem[4*n + 1] <= bit_count[n];
        mem[4*n + 2] <= {7'd0, wr_bit[n]};
        mem[4*n + 3] <= {7'd0, rd_bit[n]};
      end
    end
  end

  always_comb begin
    rdata = 8'd0;
    if (32'(raddr) < 4*NODES) rdata = mem[raddr];
  end

endmodule
