// tb_can_msg_buffer: writes bytes at random addresses (including ones past
// the end, which must be ignored), loads whole messages, and compares the
// buffer with a model after every clock.
module tb_can_msg_buffer;
  localparam int WORDS = 12;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, load = 1'b0;
  logic [3:0] waddr = '0;
  logic [7:0] wdata = '0;
  logic [WORDS-1:0][7:0] load_words = '0, words, model;
  int checks = 0, failures = 0;

  can_msg_buffer #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    model = '0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      checks++;
      if (words != model) begin failures++; $display("FAIL: buffer differs at step %0d", t); end
      we = 1'($urandom); load = ($urandom_range(9) == 0);
      waddr = 4'($urandom); wdata = 8'($urandom);
      for (int i = 0; i < WORDS; i++) load_words[i] = 8'($urandom);
      if (load) model = load_words;
      else if (we && waddr < WORDS) model[waddr] = wdata;
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
