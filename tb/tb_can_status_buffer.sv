// tb_can_status_buffer: captures random node states, then reads every
// address back and checks the layout (mode, bit count, written bit, read bit
// per node; zero past the end) and that the record only changes on we.
module tb_can_status_buffer;
  localparam int NODES = 3;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [NODES-1:0][1:0] mode = '0;
  logic [NODES-1:0][7:0] bit_count = '0;
  logic [NODES-1:0] wr_bit = '0, rd_bit = '0;
  logic [7:0] raddr = '0, rdata;
  logic [4*NODES-1:0][7:0] exp;
  int checks = 0, failures = 0;

  can_status_buffer #(.NODES(NODES)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    exp = '0;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      for (int n = 0; n < NODES; n++) begin
        mode[n] = 2'($urandom); bit_count[n] = 8'($urandom);
        wr_bit[n] = 1'($urandom); rd_bit[n] = 1'($urandom);
      end
      we = (t % 3 != 2);
      if (we)
        for (int n = 0; n < NODES; n++)
          exp[4*n +: 4] = {{7'd0, rd_bit[n]}, {7'd0, wr_bit[n]}, bit_count[n], {6'd0, mode[n]}};
      @(negedge clk);
      we = 1'b0;
      for (int a = 0; a < 16; a++) begin
        raddr = 8'(a);
        #1;
        check(rdata == ((a < 4*NODES) ? exp[a] : 8'd0), $sformatf("byte %0d", a));
      end
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
