// tb_complex_mult: self-checking test of the complex twiddle multiplier.
//
// Random data and random unit-magnitude twiddles (and a few corner cases that
// must saturate) are applied with a random enable. The expected product is
// computed in double precision, divided by 2^14 and rounded half up, then
// clipped to 16 bits; it must appear on the outputs exactly one enabled
// clock later and stay there while enable is low.
module tb_complex_mult;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n, en;
  logic signed [15:0] ar, ai, wr, wi, pr, pi_;
  int checks = 0, failures = 0;
  int er, ei;

  always #5 clk = ~clk;

  complex_mult #(.DW(16), .TW(16)) dut (.clk(clk), .rst_n(rst_n), .en(en),
    .a_re(ar), .a_im(ai), .w_re(wr), .w_im(wi), .p_re(pr), .p_im(pi_));

  function automatic int model(real v);
    int r;
    r = int'($floor(v / 16384.0 + 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    rst_n = 1'b0; en = 1'b0; ar = '0; ai = '0; wr = '0; wi = '0;
    er = 0; ei = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      real ang;
      en = ($urandom_range(3) != 0);
      if (i < 4) begin
        ar = -16'sd32768; ai = (i[0]) ? 16'sd32767 : -16'sd32768;
        wr = 16'sd11585;  wi = (i[1]) ? 16'sd11585 : -16'sd11585;
      end else begin
        ang = 2.0 * PI * real'($urandom_range(4095)) / 4096.0;
        ar = 16'($urandom); ai = 16'($urandom);
        wr = 16'(int'($floor($cos(ang) * 16384.0 + 0.5)));
        wi = 16'(int'($floor(-$sin(ang) * 16384.0 + 0.5)));
      end
      @(posedge clk);
      if (en) begin
        er = model(real'(ar) * real'(wr) - real'(ai) * real'(wi));
        ei = model(real'(ar) * real'(wi) + real'(ai) * real'(wr));
      end
      #1;
      checks++;
      if (int'(pr) != er || int'(pi_) != ei) begin
        failures++;
        if (failures < 10) $display("cycle %0d: got (%0d,%0d) expected (%0d,%0d)",
                                    i, pr, pi_, er, ei);
      end
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
