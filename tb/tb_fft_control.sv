// tb_fft_control: self-checking test of the control unit for N = 16.
//
// The expected control values are written out by hand for the 16-point
// pipeline: stages with delays 8, 4, 2, 1 whose inputs lag the core input by
// 0, 9, 15 and 18 samples, one twiddle multiplier whose input lags by 14,
// and a first result after 19 samples. For each accepted sample t the test
// checks every butterfly phase bit, the -j select of the two BF2II stages,
// the twiddle exponent n3 * bitrev2(quarter) and the output valid flag and
// bit-reversed index. Random cycles without an accepted sample must freeze
// the control state.
module tb_fft_control;
  logic clk = 1'b0, rst_n, en;
  logic [3:0] bf_s, triv_t, out_index;
  logic [3:0] tw_addr [1];
  logic       out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft_control #(.N(16)) dut (.clk(clk), .rst_n(rst_n), .en(en), .bf_s(bf_s), .triv_t(triv_t),
    .tw_addr(tw_addr), .out_valid(out_valid), .out_index(out_index));

  localparam int OFF [4] = '{0, 9, 15, 18};
  localparam int LEN [4] = '{8, 4, 2, 1};

  task automatic check(string what, int got, int exp, int t);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("t=%0d %s: got %0d expected %0d", t, what, got, exp);
    end
  endtask

  function automatic int md(int v);
    return ((v % 16) + 16) % 16;
  endfunction

  initial begin
    int t, p, q, f, idx;
    rst_n = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    t = 0;
    while (t < 200) begin
      en = ($urandom_range(4) != 0);
      #1;
      for (int s = 0; s < 4; s++) begin
        p = md(t - OFF[s]);
        check($sformatf("bf_s[%0d]", s), int'(bf_s[s]), (p / LEN[s]) % 2, t);
      end
      p = md(t - 9);
      check("triv_t[1]", int'(triv_t[1]), ((p / 8) % 2) ? 0 : 1, t);
      p = md(t - 18);
      check("triv_t[3]", int'(triv_t[3]), ((p / 2) % 2) ? 0 : 1, t);
      p = md(t - 14);
      q = (p / 4) % 4;
      f = (q == 1) ? 2 : (q == 2) ? 1 : q;
      check("tw_addr", int'(tw_addr[0]), (p % 4) * f, t);
      check("out_valid", int'(out_valid), (en && t >= 19) ? 1 : 0, t);
      if (t >= 19) begin
        p = md(t - 19);
        idx = {p[0], p[1], p[2], p[3]};
        check("out_index", int'(out_index), idx, t);
      end
      @(posedge clk);
      if (en) t++;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
