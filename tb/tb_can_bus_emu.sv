// tb_can_bus_emu: drives random write patterns through whole bit times
// (clear, one write slot per node, then a look at the bus) and checks that
// the bus is the AND of all written bits, and that it is recessive after a
// clear and when nobody writes.
module tb_can_bus_emu;
  localparam int NODES = 3;
  logic clk = 1'b0, rst_n = 1'b0, phase_clear = 1'b0, bus;
  logic [NODES-1:0] wr_en = '0, wr_bit = '0;
  int checks = 0, failures = 0;

  can_bus_emu #(.NODES(NODES)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [NODES-1:0] bits, writes;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(bus == 1'b1, "recessive after reset");
    for (int t = 0; t < 200; t++) begin
      bits   = NODES'($urandom);
      writes = (t % 7 == 0) ? '0 : NODES'($urandom) | NODES'(1);
      phase_clear = 1'b1;
      @(negedge clk);
      phase_clear = 1'b0;
      check(bus == 1'b1, "recessive after clear");
      for (int n = 0; n < NODES; n++) begin
        wr_en = '0; wr_en[n] = writes[n]; wr_bit = bits;
        @(negedge clk);
      end
      wr_en = '0;
      // all-at-once writes as well
      check(bus == &(~writes | bits), $sformatf("wired AND of %b/%b", writes, bits));
      @(negedge clk);
      check(bus == &(~writes | bits), "bus holds between phases");
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
