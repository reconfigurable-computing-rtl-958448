// tb_can_network_top: end-to-end test of the three-node network at its
// default size, driven through the host link as the host program would.
//
// A host model sends messages over the flag/byte link and collects the DATA
// messages the network returns. The scenario: straight after reset, in trace
// mode (one bus bit per host message), all three nodes are given a frame
// before the bus has been idle for 10 bits, so all three start in the same
// bit and must arbitrate, lowest identifier first, the losers retrying; the
// status record is read back while the bus is stopped; node 0 sends id 100
// "FIRST", both other nodes must return it and its bus stream must match the
// reference model bit for bit; an unheld bus bit must take 2*NODES+2 = 8
// clocks; two nodes queue behind a long frame of zero bytes (stuff bits) and
// arbitrate when it ends; a request for a node that does not exist is
// dropped; ENDPRG stops the bus. Each mechanism is counted and one that
// never occurs is a failure.
module tb_can_network_top;
  import can_pkg::*;
  import can_ref_pkg::*;

  localparam int NODES = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic gpo = 1'b0, gpi;
  logic ctrl_valid = 1'b0, ctrl_ready;
  logic [7:0] ctrl_data = '0;
  logic stat_valid, stat_ready = 1'b0;
  logic [7:0] stat_data;
  logic [7:0] bank_addr = '0, bank_data;
  logic bus, halted, trace, req_dropped;
  logic [NODES-1:0][1:0] node_mode;
  node_evt_t [NODES-1:0] node_evt;
  logic [31:0] bit_cycles;

  can_network_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sof = 0, n_stuff = 0, n_arb = 0, n_ack = 0, n_txd = 0, n_rxd = 0;
  int n_hold = 0, n_trace_stop = 0, n_drop = 0, n_err = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- event counters
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      n_sof   += int'(node_evt[n].sof);
      n_stuff += int'(node_evt[n].stuff_bit);
      n_arb   += int'(node_evt[n].arb_lost);
      n_ack   += int'(node_evt[n].ack_sent);
      n_txd   += int'(node_evt[n].tx_done);
      n_rxd   += int'(node_evt[n].rx_done);
      n_err   += int'(node_evt[n].bit_err | node_evt[n].stuff_err | node_evt[n].crc_err | node_evt[n].ack_err);
    end
    n_drop += int'(req_dropped);
    if (dut.started && !halted && (dut.host_busy || (|dut.rx_valid)) && dut.u_seq.state == dut.u_seq.S_CHECK)
      n_hold++;
    if (dut.u_seq.state == dut.u_seq.S_TRACE) n_trace_stop++;
  end

  // ---------------------------------------------------------------- bus recorder
  // Records the bus level seen in the first read slot of every pass.
  bit bus_log[$];
  always @(posedge clk) if (rst_n && dut.rd_en[0]) bus_log.push_back(bus);

  // ---------------------------------------------------------------- host model
  typedef byte unsigned msg_t[$];
  msg_t inbox[$];

  // All host-side signals change 1 time unit after a rising edge, so every
  // handshake decision below sees settled DUT outputs.
  task automatic tick(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic put_byte(input logic [7:0] b);
    ctrl_data  = b;
    ctrl_valid = 1'b1;
    while (!ctrl_ready) tick(1);
    tick(1);
    ctrl_valid = 1'b0;
  endtask

  task automatic get_byte(output logic [7:0] b);
    stat_ready = 1'b1;
    while (!stat_valid) tick(1);
    b = stat_data;
    tick(1);
    stat_ready = 1'b0;
  endtask

  task automatic host_recv();
    logic [7:0] t, c, b;
    msg_t m;
    get_byte(t);
    get_byte(c);
    for (int i = 0; i < int'(c); i++) begin
      get_byte(b);
      m.push_back(b);
    end
    check(t == MSG_DATA, "FPGA message type is DATA");
    put_byte(8'hAA);      // OK
    inbox.push_back(m);
  endtask

  task automatic host_send(input logic [7:0] mtype, input msg_t items);
    logic [7:0] a;
    gpo = 1'b1;
    tick(2);
    while (gpi) begin
      host_recv();
      tick(1);
    end
    put_byte(mtype);
    get_byte(a);
    check(a == mtype, "type byte echoed");
    if (mtype == MSG_DATA || mtype == MSG_STATUSREQ) begin
      put_byte(8'(items.size()));
      get_byte(a);
      check(a == 8'(items.size()), "count echoed");
      foreach (items[i]) begin
        put_byte(items[i]);
        get_byte(a);
        check(a == items[i], "item echoed");
      end
    end
    gpo = 1'b0;
    tick(3);
  endtask

  function automatic msg_t data_msg(input int node, input int id, input byte unsigned d[$]);
    msg_t m;
    m.push_back(8'(node));
    m.push_back(8'(id));
    m.push_back(8'(d.size()));
    foreach (d[i]) m.push_back(d[i]);
    while (m.size() < 12) m.push_back(8'h00);
    return m;
  endfunction

  // Serve FPGA messages until `want` are in the inbox or the limit passes.
  task automatic collect(input int want, input int limit);
    int t = 0;
    while (inbox.size() < want && t < limit) begin
      if (gpi) host_recv();
      else begin
        tick(1);
        t++;
      end
    end
  endtask

  function automatic bit msg_is(input msg_t m, input int node, input int id, input byte unsigned d[$]);
    if (m.size() != 3 + d.size()) return 0;
    if (m[0] != node || m[1] != id || m[2] != d.size()) return 0;
    foreach (d[i]) if (m[3+i] != d[i]) return 0;
    return 1;
  endfunction

  // ---------------------------------------------------------------- scenario
  byte unsigned first[$] = '{8'h46, 8'h49, 8'h52, 8'h53, 8'h54};   // "FIRST"
  byte unsigned zeros[$] = '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
  byte unsigned d1[$]    = '{8'h11, 8'h22};
  byte unsigned d2[$]    = '{8'hA5};
  byte unsigned d3[$]    = '{8'h3C, 8'hC3, 8'h7E};
  msg_t empty_items;
  msg_t m;
  int   start_log, c0, c1;
  bitq_t exp_stream;
  bit   found;

  initial begin
    tick(4);
    rst_n = 1'b1;
    tick(4);

    // ---- three-node arbitration straight after reset: the bus has not yet
    //      seen 10 recessive bits, so in trace mode all three frames are ready
    //      before any node may start, and all start in the same bus bit
    host_send(MSG_TRACEON, empty_items);
    host_send(MSG_DATA, data_msg(0, 8'h55, zeros));
    host_send(MSG_DATA, data_msg(1, 8'h54, d3));
    host_send(MSG_DATA, data_msg(2, 8'h56, d1));
    tick(200);
    check(bit_cycles == 4, $sformatf("trace mode: one bus bit per host message (got %0d)", bit_cycles));
    // status record in trace mode must match the node state
    for (int a = 0; a < 12; a++) begin
      bank_addr = 8'(a);
      #1;
      if (a % 4 == 0) check(bank_data == {6'd0, node_mode[a/4]}, "status mode byte");
      if (a % 4 == 1) check(bank_data == dut.bit_count[a/4], "status bit count byte");
      if (a % 4 == 3) check(bank_data == 8'd1, "status read bit recessive");
    end
    host_send(MSG_TRACEOFF, empty_items);
    collect(6, 60000);
    check(inbox.size() == 6, "three frames, two receivers each");
    if (inbox.size() == 6) begin
      check(msg_is(inbox[0], 0, 8'h54, d3),    "0x54 first, to node 0");
      check(msg_is(inbox[1], 2, 8'h54, d3),    "0x54 first, to node 2");
      check(msg_is(inbox[2], 1, 8'h55, zeros), "0x55 second, to node 1");
      check(msg_is(inbox[3], 2, 8'h55, zeros), "0x55 second, to node 2");
      check(msg_is(inbox[4], 0, 8'h56, d1),    "0x56 third, to node 0");
      check(msg_is(inbox[5], 1, 8'h56, d1),    "0x56 third, to node 1");
    end
    check(n_arb == 3, $sformatf("three arbitration losses (got %0d)", n_arb));
    inbox.delete();

    // ---- a single frame from node 0, as in the host program's first option
    tick(200);
    start_log = bus_log.size();
    host_send(MSG_DATA, data_msg(0, 100, first));
    collect(2, 20000);
    check(inbox.size() == 2, "two receivers returned the frame");
    if (inbox.size() == 2) begin
      check(msg_is(inbox[0], 1, 100, first), "node 1 got 1/100/5/FIRST");
      check(msg_is(inbox[1], 2, 100, first), "node 2 got 2/100/5/FIRST");
    end
    // compare the bus stream with the reference (ACK slot driven dominant by the receivers)
    exp_stream = ref_stuff(ref_frame(11'd100, 4'd5, {24'd0, 8'h54, 8'h53, 8'h52, 8'h49, 8'h46}), 4'd5);
    found = 0;
    for (int s = start_log; s < bus_log.size(); s++)
      if (bus_log[s] == 1'b0) begin
        found = 1;
        for (int i = 0; i < exp_stream.size() && s + i < bus_log.size(); i++) begin
          bit e;
          e = exp_stream[i];
          if (i == exp_stream.size() - 12) e = 1'b0;   // ACK slot
          if (bus_log[s + i] != e) begin
            check(0, $sformatf("bus bit %0d of frame differs", i));
            break;
          end
        end
        check(bus_log.size() - s >= exp_stream.size(), "whole frame seen on the bus");
        break;
      end
    check(found, "frame start seen on the bus");
    inbox.delete();

    // ---- bit rate: 8 clocks per unheld bus bit
    c0 = bit_cycles;
    tick(800);
    c1 = bit_cycles;
    check(c1 - c0 == 100, $sformatf("800 clocks give 100 bus bits (got %0d)", c1 - c0));

    // ---- two nodes queue behind a long frame of node 0, then arbitrate
    host_send(MSG_DATA, data_msg(0, 8'h30, zeros));
    tick(150);                            // node 0 is on the bus
    check(node_mode[0] == MODE_SEND, "node 0 sending");
    host_send(MSG_DATA, data_msg(1, 8'h20, d1));
    host_send(MSG_DATA, data_msg(2, 8'h10, d2));
    collect(6, 40000);
    check(inbox.size() == 6, "three frames, two receivers each");
    if (inbox.size() == 6) begin
      check(msg_is(inbox[0], 1, 8'h30, zeros), "long frame to node 1");
      check(msg_is(inbox[1], 2, 8'h30, zeros), "long frame to node 2");
      check(msg_is(inbox[2], 0, 8'h10, d2), "winner id 0x10 to node 0");
      check(msg_is(inbox[3], 1, 8'h10, d2), "winner id 0x10 to node 1 (loser)");
      check(msg_is(inbox[4], 0, 8'h20, d1), "retry id 0x20 to node 0");
      check(msg_is(inbox[5], 2, 8'h20, d1), "retry id 0x20 to node 2");
    end
    check(n_arb == 4, $sformatf("one more arbitration loss (got %0d)", n_arb));
    inbox.delete();

    // ---- request for a node that does not exist, status request, end
    host_send(MSG_DATA, data_msg(5, 8'h01, d2));
    host_send(MSG_STATUSREQ, empty_items);
    host_send(MSG_ENDPRG, empty_items);
    tick(20);
    c0 = bit_cycles;
    tick(200);
    check(halted && bit_cycles == c0, "ENDPRG stops the bus");
    check(gpi == 1'b0, "nothing left for the host");

    // ---- every mechanism happened
    check(n_sof   > 0, $sformatf("start-of-frame detection happened %0d times", n_sof));
    check(n_stuff > 0, $sformatf("stuff bits removed %0d times", n_stuff));
    check(n_arb   == 4, $sformatf("arbitration lost %0d times", n_arb));
    check(n_ack   > 0, $sformatf("ACKs written %0d times", n_ack));
    check(n_txd   == 7, $sformatf("frames sent %0d", n_txd));
    check(n_rxd   == 14, $sformatf("frames received %0d", n_rxd));
    check(n_hold  > 0, $sformatf("bus held for the host %0d clocks", n_hold));
    check(n_trace_stop > 0, $sformatf("trace stops %0d clocks", n_trace_stop));
    check(n_drop  == 1, $sformatf("requests dropped %0d", n_drop));
    check(n_err   == 0, $sformatf("error events %0d", n_err));
    $display("mechanisms: sof=%0d stuff=%0d arb_lost=%0d ack=%0d tx=%0d rx=%0d hold=%0d trace=%0d drop=%0d",
             n_sof, n_stuff, n_arb, n_ack, n_txd, n_rxd, n_hold, n_trace_stop, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(400000);

    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
