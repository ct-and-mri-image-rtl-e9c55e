// tb_twiddle_rom: self-checking test of the twiddle table.
//
// Reads every entry of a 64-point table and of a 16-point table and compares
// it with cos(2*pi*e/NPT) and -sin(2*pi*e/NPT) scaled by 2^14, allowing the
// half-LSB rounding of the stored values.
module tb_twiddle_rom;
  localparam real PI = 3.14159265358979323846;
  logic [5:0] a64;
  logic [3:0] a16;
  logic signed [15:0] r64, i64, r16, i16;
  int checks = 0, failures = 0;

  twiddle_rom #(.NPT(64), .TW(16)) dut64 (.addr(a64), .w_re(r64), .w_im(i64));
  twiddle_rom #(.NPT(16), .TW(16)) dut16 (.addr(a16), .w_re(r16), .w_im(i16));

  task automatic check(int npt, int e, int re, int im);
    real cr, ci;
    cr = $cos(2.0 * PI * e / npt) * 16384.0;
    ci = -$sin(2.0 * PI * e / npt) * 16384.0;
    checks++;
    if ((real'(re) - cr) > 0.5 || (cr - real'(re)) > 0.5 ||
        (real'(im) - ci) > 0.5 || (ci - real'(im)) > 0.5) begin
      failures++;
      if (failures < 10) $display("NPT=%0d e=%0d got (%0d,%0d) expected (%f,%f)",
                                  npt, e, re, im, cr, ci);
    end
  endtask

  initial begin
    for (int e = 0; e < 48; e++) begin
      a64 = 6'(e);
      #1 check(64, e, r64, i64);
    end
    for (int e = 0; e < 12; e++) begin
      a16 = 4'(e);
      #1 check(16, e, r16, i16);
    end
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
