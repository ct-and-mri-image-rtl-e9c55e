// tb_trivial_mult: self-checking test of the -j multiplier.
//
// For every combination of the control inputs t and s and random samples,
// the output must be (im, -re) when t = 0 and s = 1 and the input otherwise;
// the most negative real part must saturate on negation.
module tb_trivial_mult;
  localparam int DW = 16;
  logic t, s;
  logic signed [DW-1:0] ir, ii, o_r, o_i;
  int checks = 0, failures = 0;

  trivial_mult #(.DW(DW)) dut (.t(t), .s(s), .in_re(ir), .in_im(ii), .out_re(o_r), .out_im(o_i));

  task automatic apply(int re, int im, bit tt, bit ss);
    int er, ei;
    ir = DW'(re); ii = DW'(im); t = tt; s = ss;
    #1;
    if (!tt && ss) begin
      er = im;
      ei = (re == -32768) ? 32767 : -re;
    end else begin
      er = re;
      ei = im;
    end
    checks++;
    if (int'(o_r) != er || int'(o_i) != ei) begin
      failures++;
      if (failures < 10)
        $display("t=%0d s=%0d in=(%0d,%0d) out=(%0d,%0d) expected (%0d,%0d)",
                 tt, ss, re, im, o_r, o_i, er, ei);
    end
  endtask

  initial begin
    for (int c = 0; c < 4; c++) apply(-32768, 1234, c[1], c[0]);
    for (int i = 0; i < 1000; i++)
      apply(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
            i[1], i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
