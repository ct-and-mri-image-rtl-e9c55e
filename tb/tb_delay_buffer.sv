// tb_delay_buffer: self-checking test of the feedback delay line.
//
// Two instances, L = 8 (memory form) and L = 1 (register form), get random
// words with a random enable. A queue model holds every accepted word; once
// L words have entered, dout must equal the word accepted L enables earlier,
// and it must not change while enable is low.
module tb_delay_buffer;
  localparam int W = 12;
  logic clk = 1'b0, rst_n, en;
  logic [W-1:0] din, d8, d1;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  always #5 clk = ~clk;

  delay_buffer #(.L(8), .W(W)) dut8 (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(d8));
  delay_buffer #(.L(1), .W(W)) dut1 (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(d1));

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      en  = ($urandom_range(3) != 0);
      din = W'($urandom);
      #1;
      // dout shows the word that entered L accepted cycles ago
      if (hist.size() >= 8) check("L=8", d8, hist[hist.size() - 8]);
      if (hist.size() >= 1) check("L=1", d1, hist[hist.size() - 1]);
      @(posedge clk);
      if (en) hist.push_back(din);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
