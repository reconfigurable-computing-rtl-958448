// tb_can_phase_seq: checks the slot order of a bus bit (clear, writes of
// nodes 0..N-1, reads of nodes 0..N-1, status), its length of 2*N+2 clocks,
// that hold and run stop it at the start of a bit, and that in trace mode it
// stops after every bit until step.
module tb_can_phase_seq;
  localparam int NODES = 3;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, hold = 1'b0, trace = 1'b0, step = 1'b0;
  logic phase_clear, status_we;
  logic [NODES-1:0] wr_en, rd_en;
  logic [31:0] bit_cycles;
  int checks = 0, failures = 0;

  can_phase_seq #(.NODES(NODES)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one expected bit: returns after the status clock
  task automatic expect_bit();
    check(phase_clear && wr_en == '0 && rd_en == '0, "clear first");
    @(negedge clk);
    for (int n = 0; n < NODES; n++) begin
      check(wr_en == NODES'(1 << n) && rd_en == '0 && !status_we, $sformatf("write slot %0d", n));
      @(negedge clk);
    end
    for (int n = 0; n < NODES; n++) begin
      check(rd_en == NODES'(1 << n) && wr_en == '0 && !status_we, $sformatf("read slot %0d", n));
      @(negedge clk);
    end
    check(status_we && wr_en == '0 && rd_en == '0, "status slot");
    @(negedge clk);
  endtask

  initial begin
    int c0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    repeat (5) begin check(!phase_clear && wr_en == '0, "idle until run"); @(negedge clk); end
    run = 1'b1;
    #1;
    c0 = bit_cycles;
    repeat (4) expect_bit();
    check(bit_cycles - c0 == 4, "four bits counted");
    hold = 1'b1;
    #1;
    repeat (6) begin check(!phase_clear && wr_en == '0 && rd_en == '0, "held"); @(negedge clk); end
    hold = 1'b0;
    #1;
    expect_bit();
    trace = 1'b1;
    #1;
    expect_bit();
    repeat (6) begin check(!phase_clear && wr_en == '0, "trace stop"); @(negedge clk); end
    step = 1'b1; @(negedge clk); step = 1'b0;
    #1;
    expect_bit();
    trace = 1'b0;
    @(negedge clk);
    #1;
    expect_bit();
    run = 1'b0;
    #1;
    repeat (5) begin check(!phase_clear && wr_en == '0, "stopped"); @(negedge clk); end
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
