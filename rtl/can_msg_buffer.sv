// can_msg_buffer: the twelve-byte message buffer used between the host and
// the nodes.
//
// Layout of a data message: byte 0 node number, byte 1 message identifier,
// byte 2 data length, bytes 3..10 data 0..7, byte 11 spare. Bytes arrive one
// at a time through the write port (we, waddr, wdata) as the host pushes them;
// a whole message can also be loaded in one clock (load, load_words) when a
// received frame is turned into a message for the host. All bytes are
// visible in parallel on words. Writes to addresses of WORDS or more are
// ignored, and load has priority over we. The size and layout are the
// described ones; the two write ports are this design's.
module can_msg_buffer #(
  parameter int unsigned WORDS = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [3:0]             waddr,
  input  logic [7:0]             wdata,
  input  logic                   load,
  input  logic [WORDS-1:0][7:0]  load_words,
  output logic [WORDS-1:0][7:0]  words
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                    words <= '0;
    else if (load)                                 words <= load_words;
    else if (we && (32'(waddr) < WORDS))           words[waddr] <= wdata;
  end

endmodule
