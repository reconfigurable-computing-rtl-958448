// tb_can_crc15: feeds random bit streams through the CRC-15 register and
// compares the remainder with the reference division by 4599h. Also checks
// that clear zeroes the register and that en low holds it.
module tb_can_crc15;
  import can_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, din = 1'b0;
  logic [14:0] crc;
  int checks = 0, failures = 0;

  can_crc15 dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bitq_t q;
    logic [14:0] held;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      q.delete();
      @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
      check(crc == 15'd0, "clear");
      for (int i = 0; i < 1 + $urandom_range(100); i++) q.push_back(1'($urandom));
      if (t == 0) begin
        q.delete();                         // single 1: remainder is the polynomial
        q.push_back(1'b1);
      end
      foreach (q[i]) begin
        en = 1'b1; din = q[i];
        @(negedge clk);
      end
      en = 1'b0;
      held = crc;
      repeat (3) @(negedge clk);
      check(crc == held, "hold with en low");
      check(crc == ref_crc(q), $sformatf("crc of %0d bits: %h vs %h", q.size(), crc, ref_crc(q)));
      if (t == 0) check(crc == 15'h4599, "crc of a single 1");
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
