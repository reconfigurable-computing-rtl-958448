// can_bus_emu: function emulation of the CAN bus as a wired-AND register.
//
// The bus is one flip-flop. phase_clear (one clock at the start of every
// write phase) sets it to the recessive level 1. In each later clock the
// nodes whose wr_en is high AND their wr_bit into it, so a single dominant 0
// from any node leaves the bus at 0 for the rest of the bit, exactly as a
// dominant level overwrites a recessive one on a real bus. The nodes then
// sample bus in their read slots. In the time-sliced schedule only one wr_en
// is high per clock, but any number may be high together. The reset-and-AND
// behaviour is the described bus emulation; the single register and the
// one-clock update are this design's.
module can_bus_emu #(
  parameter int unsigned NODES = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             phase_clear,
  input  logic [NODES-1:0] wr_en,
  input  logic [NODES-1:0] wr_bit,
  output logic             bus
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           bus <= 1'b1;
    else if (phase_clear) bus <= 1'b1;
    else                  bus <= bus & (&(~wr_en | wr_bit));
  end

endmodule
