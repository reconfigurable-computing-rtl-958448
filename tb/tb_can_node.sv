// tb_can_node: one controller node against a testbench that plays the bus,
// the bit sequencer and a second node.
//
// Every bus bit is a write slot, where the node's bit is ANDed with the bit
// the testbench drives, followed by a read slot. The cases: the node sends a
// frame that must match the reference stuffed bit stream bit for bit and end
// in tx_done after being acknowledged; it receives a frame, writes the ACK in
// the ACK slot and returns id, DLC and data; it starts together with a
// higher-priority frame, loses arbitration, receives and acknowledges that
// frame and retransmits its own once the bus is idle again; it refuses to
// acknowledge a frame with a corrupted CRC; it retransmits after a missing
// ACK; and it flags a stuff error.
module tb_can_node;
  import can_pkg::*;
  import can_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_req = 1'b0, tx_busy;
  logic [10:0] tx_id = '0;
  logic [3:0]  tx_dlc = '0;
  logic [63:0] tx_data = '0;
  logic wr_en = 1'b0, wr_bit, rd_en = 1'b0, bus_in = 1'b1;
  logic rx_valid, rx_ack = 1'b0;
  logic [10:0] rx_id;
  logic [3:0]  rx_dlc;
  logic [63:0] rx_data;
  node_mode_e  mode;
  logic [7:0]  bit_count;
  logic last_wr, last_rd;
  node_evt_t evt;

  can_node dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_arb = 0, n_crc = 0, n_ack_err = 0, n_stuff_err = 0, n_tx = 0, n_rx = 0, n_ack = 0;
  always @(posedge clk) if (rst_n) begin
    n_arb += int'(evt.arb_lost); n_crc += int'(evt.crc_err); n_ack_err += int'(evt.ack_err);
    n_stuff_err += int'(evt.stuff_err); n_tx += int'(evt.tx_done); n_rx += int'(evt.rx_done);
    n_ack += int'(evt.ack_sent);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One bus bit: write slot then read slot. drv is the other side's bit.
  task automatic bit_time(input bit drv, output bit w, output bit bv);
    @(negedge clk);
    wr_en = 1'b1;
    #1 w = wr_bit;
    @(negedge clk);
    wr_en  = 1'b0;
    bv     = w & drv;
    bus_in = bv;
    rd_en  = 1'b1;
    @(negedge clk);
    rd_en  = 1'b0;
  endtask

  task automatic idle_bits(input int n);
    bit w, bv;
    repeat (n) bit_time(1'b1, w, bv);
  endtask

  task automatic request(input bit [10:0] id, input bit [3:0] dlc, input bit [63:0] d);
    @(negedge clk);
    tx_id = id; tx_dlc = dlc; tx_data = d; tx_req = 1'b1;
    @(negedge clk);
    tx_req = 1'b0;
  endtask

  task automatic take_rx(input bit [10:0] id, input bit [3:0] dlc, input bit [63:0] d, input string what);
    bit [63:0] mask;
    mask = (ref_bytes(dlc) == 8) ? '1 : (64'd1 << (8*ref_bytes(dlc))) - 1;
    check(rx_valid, {what, ": frame offered"});
    check(rx_id == id && rx_dlc == dlc && rx_data == (d & mask), {what, ": contents"});
    @(negedge clk); rx_ack = 1'b1; @(negedge clk); rx_ack = 1'b0;
    check(!rx_valid, {what, ": released"});
  endtask

  // Drive a stuffed stream as the other node; ack_slot = index of ACK slot.
  // Returns the node's written bit at the ACK slot.
  task automatic drive_stream(input bitq_t s, input int ack_idx, output bit ack_w);
    bit w, bv;
    ack_w = 1'b1;
    foreach (s[i]) begin
      bit_time(s[i], w, bv);
      if (i == ack_idx) ack_w = w;
    end
  endtask

  // Let the node send; acknowledge if ack is set. Compares its bits with exp.
  task automatic watch_send(input bitq_t exp, input bit ack, input string what);
    bit w, bv;
    int t = 0;
    do begin bit_time(1'b1, w, bv); t++; end while (w && t < 300);
    check(t < 300, {what, ": SOF"});
    check(w == exp[0], {what, ": bit 0"});
    for (int i = 1; i < exp.size(); i++) begin
      bit_time((ack && i == exp.size() - 12) ? 1'b0 : 1'b1, w, bv);
      if (w != exp[i]) begin
        check(0, $sformatf("%s: bit %0d", what, i));
        break;
      end
    end
    checks++;
    repeat (2) @(negedge clk);   // let the end-of-frame event be counted
  endtask

  initial begin
    bitq_t s1, s2, s3, sc;
    bitq_t fc;
    bit ackw, w, bv;
    int arb_bit;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(mode == MODE_IDLE && !tx_busy, "idle after reset");

    // ---- A: send, acknowledged. Right after reset the bus is held dominant
    //      (busy, but no SOF since it has not been idle long enough) until the
    //      frame is built, so the node must first show WAIT and then start
    //      after 10 idle bits.
    repeat (2) bit_time(1'b0, w, bv);
    request(11'h123, 4'd3, 64'h0000_0000_00FF_0000);
    repeat (20) bit_time(1'b0, w, bv);
    check(mode == MODE_WAIT && tx_busy, "frame ready on a busy bus: waiting");
    s1 = ref_stuff(ref_frame(11'h123, 4'd3, 64'h0000_0000_00FF_0000), 4'd3);
    watch_send(s1, 1, "send");
    check(n_tx == 1 && !tx_busy && mode == MODE_IDLE, "send: done and idle");

    // ---- B: receive and acknowledge
    idle_bits(3);
    s2 = ref_stuff(ref_frame(11'h0AB, 4'd8, 64'h0123_4567_89AB_CDEF), 4'd8);
    drive_stream(s2, s2.size() - 12, ackw);
    check(ackw == 1'b0, "receive: ACK written");
    take_rx(11'h0AB, 4'd8, 64'h0123_4567_89AB_CDEF, "receive");
    check(n_rx == 1 && mode == MODE_IDLE, "receive: idle again");

    // ---- C: arbitration. The node's request arrives while a frame is on the
    //      bus; right after it both sides start together, the other side with
    //      the lower identifier 0x100 against the node's 0x200.
    s2 = ref_stuff(ref_frame(11'h055, 4'd0, 64'd0), 4'd0);
    fork
      drive_stream(s2, s2.size() - 12, ackw);
      begin repeat (10) @(negedge clk); request(11'h200, 4'd1, 64'h5A); end
    join
    take_rx(11'h055, 4'd0, 64'd0, "busy bus");
    check(tx_busy, "request pending behind the busy bus");
    idle_bits(1);                // the bit that ends the idle period
    s3 = ref_stuff(ref_frame(11'h100, 4'd2, 64'hBEEF), 4'd2);
    arb_bit = -1;
    foreach (s3[i]) begin
      bit_time(s3[i], w, bv);
      if (i == 0) check(w == 1'b0, "arbitration: node starts in the same bit");
      if (arb_bit < 0 && n_arb == 1) arb_bit = i;
      if (i == s3.size() - 12) check(w == 1'b0, "arbitration: loser acknowledges");
    end
    // ids 0x100 / 0x200 first differ at identifier bit 9, frame bit 2; the
    // event is registered in that read slot and counted one bit later
    check(arb_bit == 3, $sformatf("arbitration lost in frame bit 2 (counted after bit %0d)", arb_bit));
    check(mode == MODE_WAIT, "arbitration: waiting");
    take_rx(11'h100, 4'd2, 64'hBEEF, "arbitration winner");
    watch_send(ref_stuff(ref_frame(11'h200, 4'd1, 64'h5A), 4'd1), 1, "retransmit");
    check(n_tx == 2 && !tx_busy, "retransmitted");

    // ---- D: corrupted CRC is not acknowledged
    idle_bits(3);
    fc = ref_frame(11'h077, 4'd2, 64'h1234);
    fc[19 + 16 + 3] = ~fc[19 + 16 + 3];
    sc = ref_stuff(fc, 4'd2);
    drive_stream(sc, sc.size() - 12, ackw);
    check(ackw == 1'b1, "bad CRC: no ACK");
    check(n_crc == 1 && !rx_valid, "bad CRC: flagged, not offered");

    // ---- E: missing ACK, then retransmission
    idle_bits(3);
    request(11'h00F, 4'd0, 64'd0);
    s1 = ref_stuff(ref_frame(11'h00F, 4'd0, 64'd0), 4'd0);
    watch_send(s1, 0, "no ACK");
    check(n_ack_err == 1 && tx_busy && mode == MODE_WAIT, "no ACK: flagged, still pending");
    watch_send(s1, 1, "second attempt");
    check(n_tx == 3 && !tx_busy, "second attempt done");

    // ---- F: stuff error (six dominant bits)
    idle_bits(12);
    repeat (7) bit_time(1'b0, w, bv);
    check(n_stuff_err == 1, "stuff error flagged");
    idle_bits(12);
    check(mode == MODE_IDLE, "idle after the error");

    check(n_arb == 1 && n_rx == 3 && n_ack >= 3, $sformatf("event totals arb=%0d rx=%0d ack=%0d", n_arb, n_rx, n_ack));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
