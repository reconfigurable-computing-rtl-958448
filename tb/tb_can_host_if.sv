// tb_can_host_if: the host link against a host model and three stand-in
// nodes. Checks the echo of every byte, the start flag and trace steps, the
// frame request a DATA message produces (node, {000,id}, DLC, data bytes),
// dropping of requests for a busy or non-existent node, trace on/off, end of
// program, that host_busy covers an incoming message, and that received
// frames come back as DATA messages, lowest node first, each released with
// rx_ack only after the host's OK.
module tb_can_host_if;
  import can_pkg::*;

  localparam int NODES = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic gpo = 1'b0, gpi, ctrl_valid = 1'b0, ctrl_ready, stat_valid, stat_ready = 1'b0;
  logic [7:0] ctrl_data = '0, stat_data;
  logic [NODES-1:0] tx_req, tx_busy = '0, rx_valid = '0, rx_ack;
  logic [10:0] tx_id;
  logic [3:0]  tx_dlc;
  logic [63:0] tx_data;
  logic [NODES-1:0][10:0] rx_id = '0;
  logic [NODES-1:0][3:0]  rx_dlc = '0;
  logic [NODES-1:0][63:0] rx_data = '0;
  logic host_busy, started, halted, trace, step, req_dropped;

  can_host_if #(.NODES(NODES)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_req[NODES], n_drop = 0, n_step = 0, n_busy = 0;
  logic [10:0] last_id; logic [3:0] last_dlc; logic [63:0] last_data;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) if (tx_req[n]) n_req[n]++;
    if (|tx_req) begin last_id = tx_id; last_dlc = tx_dlc; last_data = tx_data; end
    n_drop += int'(req_dropped);
    n_step += int'(step);
    n_busy += int'(host_busy);
    // stand-in nodes drop their frame on rx_ack
    rx_valid <= rx_valid & ~rx_ack;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic put_byte(input logic [7:0] b);
    ctrl_data = b; ctrl_valid = 1'b1;
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

  typedef byte unsigned msg_t[$];
  msg_t inbox[$];

  task automatic host_recv();
    logic [7:0] t, c, b;
    msg_t m;
    check(gpi, "gpi raised for a message");
    get_byte(t); get_byte(c);
    for (int i = 0; i < int'(c); i++) begin get_byte(b); m.push_back(b); end
    check(t == MSG_DATA, "message type DATA");
    check(|rx_valid, "frame held until OK");
    put_byte(8'h01);
    inbox.push_back(m);
  endtask

  task automatic host_send(input logic [7:0] mtype, input msg_t items);
    logic [7:0] a;
    gpo = 1'b1;
    tick(2);
    while (gpi) begin host_recv(); tick(1); end
    put_byte(mtype);
    get_byte(a);
    check(a == mtype, "type echoed");
    if (mtype == MSG_DATA || mtype == MSG_STATUSREQ) begin
      put_byte(8'(items.size())); get_byte(a);
      check(a == 8'(items.size()), "count echoed");
      foreach (items[i]) begin
        put_byte(items[i]); get_byte(a);
        check(a == items[i], "item echoed");
      end
    end
    gpo = 1'b0;
    tick(3);
  endtask

  msg_t none;

  initial begin
    int b0;
    foreach (n_req[n]) n_req[n] = 0;
    tick(3);
    rst_n = 1'b1;
    tick(2);
    check(!started && !trace && !halted && !gpi, "reset state");

    host_send(MSG_TEST, none);
    check(started && n_step == 1, "TEST starts the network and steps");

    b0 = n_busy;
    host_send(MSG_DATA, '{8'd1, 8'h42, 8'd3, 8'hA1, 8'hB2, 8'hC3, 0, 0, 0, 0, 0, 0});
    check(n_busy - b0 > 10, "host_busy during the message");
    check(n_req[1] == 1 && n_req[0] == 0 && n_req[2] == 0, "one request to node 1");
    check(last_id == 11'h042 && last_dlc == 4'd3 && last_data[23:0] == 24'hC3B2A1, "request contents");

    tx_busy[2] = 1'b1;
    host_send(MSG_DATA, '{8'd2, 8'h10, 8'd1, 8'h99, 0, 0, 0, 0, 0, 0, 0, 0});
    check(n_req[2] == 0 && n_drop == 1, "request to a busy node dropped");
    tx_busy[2] = 1'b0;
    host_send(MSG_DATA, '{8'd7, 8'h10, 8'd1, 8'h99, 0, 0, 0, 0, 0, 0, 0, 0});
    check(n_drop == 2, "request to a missing node dropped");

    host_send(MSG_TRACEON, none);
    check(trace, "trace on");
    host_send(MSG_STATUSREQ, none);
    host_send(MSG_TRACEOFF, none);
    check(!trace && n_step == 7, "trace off, one step per message");

    // two received frames, node 2 first in time, node 0 must go first
    rx_id[2] = 11'h064; rx_dlc[2] = 4'd5; rx_data[2] = 64'h5453524946;
    rx_id[0] = 11'h7FF; rx_dlc[0] = 4'd0;
    rx_valid[2] = 1'b1;
    rx_valid[0] = 1'b1;
    // the host wants to send at the same time: it must serve the FPGA first
    host_send(MSG_TEST, none);
    while (inbox.size() < 2) begin if (gpi) host_recv(); else tick(1); end
    check(inbox[0].size() == 3 && inbox[0][0] == 0 && inbox[0][1] == 8'hFF && inbox[0][2] == 0,
          "node 0 frame first, id low byte only");
    check(inbox[1].size() == 8 && inbox[1][0] == 2 && inbox[1][1] == 100 && inbox[1][2] == 5 &&
          inbox[1][3] == 8'h46 && inbox[1][7] == 8'h54, "2 / 100 / 5 / FIRST");
    tick(2);
    check(rx_valid == '0 && !gpi, "frames released");

    host_send(MSG_ENDPRG, none);
    check(halted, "ENDPRG halts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
