// tb_can_frame_builder: builds frames for random identifiers, every DLC from
// 0 to 15 and random data, and compares each frame bit and the frame length
// with the reference model. The build must take crc_start+1 clocks from
// start to done (19+8*bytes CRC steps and one clock to place the CRC).
module tb_can_frame_builder;
  import can_pkg::*;
  import can_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [10:0] id = '0;
  logic [3:0]  dlc = '0;
  logic [63:0] data = '0;
  logic [FRAME_MAX-1:0] frame;
  logic [6:0]  frame_len;
  int checks = 0, failures = 0;

  can_frame_builder dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bitq_t f;
    int lat, nb;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 48; t++) begin
      @(negedge clk);
      id   = 11'($urandom);
      dlc  = 4'(t % 16);
      data = {$urandom, $urandom};
      if (t == 1) begin id = 11'd100; dlc = 4'd5; data = {24'd0, 40'h5453524946}; end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      // lat counts clock edges from the one that samples start
      while (!done && lat < 200) begin @(negedge clk); lat++; end
      nb = ref_bytes(dlc);
      f  = ref_frame(id, dlc, data);
      check(lat - 1 == 19 + 8*nb + 1, $sformatf("latency %0d for %0d bytes", lat, nb));
      check(int'(frame_len) == f.size(), $sformatf("frame length %0d vs %0d", frame_len, f.size()));
      foreach (f[i]) if (frame[i] != f[i]) begin
        check(0, $sformatf("frame bit %0d (dlc %0d)", i, dlc));
        break;
      end
      checks++;
      check(!busy, "not busy after done");
    end
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
