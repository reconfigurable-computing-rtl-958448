// can_phase_seq: the main loop of the controller array, one bus bit per pass.
//
// The nodes share no clock of their own: every bus bit is produced by one
// pass of this sequencer. A pass starts in CHECK, which waits while hold is
// high (the host link is taking a message, or a received frame has not yet
// been handed to the host) or run is low (not started, or ended). It then
// pulses phase_clear (bus back to recessive), gives each node in turn one
// write slot (wr_en[0], wr_en[1], ...), then each node in turn one read slot
// (rd_en[0], ...), and finally pulses status_we so the status record is
// refreshed. An unheld pass takes 2*NODES+2 clocks (8 with three nodes). In
// trace mode the sequencer stops after each pass until step pulses. The
// order of the phases follows the described write/read cycle; the one-clock
// slots and the trace stop point are this design's choices.
module can_phase_seq #(
  parameter int unsigned NODES = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             hold,
  input  logic             trace,
  input  logic             step,
  output logic             phase_clear,
  output logic [NODES-1:0] wr_en,
  output logic [NODES-1:0] rd_en,
  output logic             status_we,
  output logic [31:0]      bit_cycles
);

  typedef enum logic [2:0] {S_CHECK, S_WRITE, S_READ, S_STATUS, S_TRACE} seq_state_e;

  localparam int unsigned SW = (NODES > 1) ? $clog2(NODES) : 1;

  seq_state_e      state;
  logic [SW-1:0]   slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_CHECK;
      slot       <= '0;
      bit_cycles <= '0;
    end else begin
      unique case (state)
        S_CHECK:  if (run && !hold) begin state <= S_WRITE; slot <= '0; end
        S_WRITE:  if (32'(slot) == NODES-1) begin state <= S_READ; slot <= '0; end
                  else slot <= slot + 1'b1;
        S_READ:   if (32'(slot) == NODES-1) state <= S_STATUS;
                  else slot <= slot + 1'b1;
        S_STATUS: begin
                    bit_cycles <= bit_cycles + 32'd1;
                    state      <= trace ? S_TRACE : S_CHECK;
                  end
        S_TRACE:  if (step || !trace) state <= S_CHECK;
        default:  state <= S_CHECK;
      endcase
    end
  end

  always_comb begin
    phase_clear = (state == S_CHECK) && run && !hold;
    wr_en       = '0;
    rd_en       = '0;
    if (state == S_WRITE) wr_en[slot] = 1'b1;
    if (state == S_READ)  rd_en[slot] = 1'b1;
    status_we   = (state == S_STATUS);
  end

endmodule
