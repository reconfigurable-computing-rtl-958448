// can_network_top: a network of CAN 2.0A controller nodes on an emulated bus,
// driven by a host through a flag-and-byte link.
//
// NODES can_node controllers (three by default) share one can_bus_emu
// wired-AND bus. can_phase_seq runs the nodes time-sliced: each bus bit is one
// pass of write slots for every node, read slots for every node and a status
// write, so the nodes act as if they ran in parallel on a common bit clock
// although only one touches the bus per clock. can_host_if takes messages
// from the host (DATA requests a frame from a node; trace, test, status and
// end-of-program control the loop) and returns every frame a node received
// as a DATA message. The sequencer waits at the start of a bus bit while a
// host message is coming in or a received frame is still waiting for the
// host, as the main loop of the description does. can_status_buffer keeps
// mode, bit count, written and read bit of every node, readable by the host
// at any time through bank_addr/bank_data.
//
// Ports: the host flags gpo (in) and gpi (out), the control byte channel
// (host to FPGA) and status byte channel (FPGA to host) with valid/ready
// handshakes, the status read port, and for observation the bus level, the
// node modes, the number of bus bits run, per-node event flags and halted.
// The overall structure (host program, FPGA program, three nodes on a
// virtual bus) is the described one; the clocked slot timing is this design's.
module can_network_top
  import can_pkg::*;
#(
  parameter int unsigned NODES = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   gpo,
  output logic                   gpi,
  input  logic                   ctrl_valid,
  input  logic [7:0]             ctrl_data,
  output logic                   ctrl_ready,
  output logic                   stat_valid,
  output logic [7:0]             stat_data,
  input  logic                   stat_ready,
  input  logic [7:0]             bank_addr,
  output logic [7:0]             bank_data,
  output logic                   bus,
  output logic [NODES-1:0][1:0]  node_mode,
  output node_evt_t [NODES-1:0]  node_evt,
  output logic [31:0]            bit_cycles,
  output logic                   halted,
  output logic                   trace,
  output logic                   req_dropped
);

  logic                              phase_clear, status_we;
  logic [NODES-1:0]                  wr_en, rd_en, wr_bit;
  logic [NODES-1:0]                  tx_req, tx_busy;
  logic [ID_BITS-1:0]                tx_id;
  logic [3:0]                        tx_dlc;
  logic [8*MAX_BYTES-1:0]            tx_data;
  logic [NODES-1:0]                  rx_valid, rx_ack;
  logic [NODES-1:0][ID_BITS-1:0]     rx_id;
  logic [NODES-1:0][3:0]             rx_dlc;
  logic [NODES-1:0][8*MAX_BYTES-1:0] rx_data;
  logic [NODES-1:0][7:0]             bit_count;
  logic [NODES-1:0]                  last_wr, last_rd;
  logic                              host_busy, started, step;

  can_phase_seq #(.NODES(NODES)) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .run        (started && !halted),
    .hold       (host_busy || (|rx_valid)),
    .trace      (trace),
    .step       (step),
    .phase_clear(phase_clear),
    .wr_en      (wr_en),
    .rd_en      (rd_en),
    .status_we  (status_we),
    .bit_cycles (bit_cycles)
  );

  can_bus_emu #(.NODES(NODES)) u_bus (
    .clk        (clk),
    .rst_n      (rst_n),
    .phase_clear(phase_clear),
    .wr_en      (wr_en),
    .wr_bit     (wr_bit),
    .bus        (bus)
  );

  for (genvar n = 0; n < NODES; n++) begin : g_node
    node_mode_e mode;
    can_node u_node (
      .clk      (clk),
      .rst_n    (rst_n),
      .tx_req   (tx_req[n]),
      .tx_id    (tx_id),
      .tx_dlc   (tx_dlc),
      .tx_data  (tx_data),
      .tx_busy  (tx_busy[n]),
      .wr_en    (wr_en[n]),
      .wr_bit   (wr_bit[n]),
      .rd_en    (rd_en[n]),
      .bus_in   (bus),
      .rx_valid (rx_valid[n]),
      .rx_id    (rx_id[n]),
      .rx_dlc   (rx_dlc[n]),
      .rx_data  (rx_data[n]),
      .rx_ack   (rx_ack[n]),
      .mode     (mode),
      .bit_count(bit_count[n]),
      .last_wr  (last_wr[n]),
      .last_rd  (last_rd[n]),
      .evt      (node_evt[n])
    );
    assign node_mode[n] = mode;
  end

  can_host_if #(.NODES(NODES)) u_host (
    .clk        (clk),
    .rst_n      (rst_n),
    .gpo        (gpo),
    .gpi        (gpi),
    .ctrl_valid (ctrl_valid),
    .ctrl_data  (ctrl_data),
    .ctrl_ready (ctrl_ready),
    .stat_valid (stat_valid),
    .stat_data  (stat_data),
    .stat_ready (stat_ready),
    .tx_req     (tx_req),
    .tx_id      (tx_id),
    .tx_dlc     (tx_dlc),
    .tx_data    (tx_data),
    .tx_busy    (tx_busy),
    .rx_valid   (rx_valid),
    .rx_id      (rx_id),
    .rx_dlc     (rx_dlc),
    .rx_data    (rx_data),
    .rx_ack     (rx_ack),
    .host_busy  (host_busy),
    .started    (started),
    .halted     (halted),
    .trace      (trace),
    .step       (step),
    .req_dropped(req_dropped)
  );

  can_status_buffer #(.NODES(NODES)) u_status (
    .clk      (clk),
    .rst_n    (rst_n),
    .we       (status_we),
    .mode     (node_mode),
    .bit_count(bit_count),
    .wr_bit   (last_wr),
    .rd_bit   (last_rd),
    .raddr    (bank_addr),
    .rdata    (bank_data)
  );

endmodule
