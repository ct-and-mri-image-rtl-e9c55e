// tb_sdf_bf: self-checking test of the SDF butterfly.
//
// Applies random and corner-case operands with s = 0 and s = 1 and compares
// the four outputs with an integer model: s = 1 gives floor((x1 + x2) / 2)
// and floor((x1 - x2) / 2), s = 0 passes x1 and x2 straight through.
module tb_sdf_bf;
  localparam int DW = 16;
  logic                 s;
  logic signed [DW-1:0] x1r, x1i, x2r, x2i, y1r, y1i, y2r, y2i;
  int checks = 0, failures = 0;

  sdf_bf #(.DW(DW)) dut (.s(s), .x1_re(x1r), .x1_im(x1i), .x2_re(x2r), .x2_im(x2i),
                         .y1_re(y1r), .y1_im(y1i), .y2_re(y2r), .y2_im(y2i));

  function automatic int fdiv2(int v);   // floor(v / 2)
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply(int a, int b, int c, int d, bit sel);
    x1r = DW'(a); x1i = DW'(b); x2r = DW'(c); x2i = DW'(d); s = sel;
    #1;
    if (sel) begin
      check("y1_re", y1r, fdiv2(a + c));
      check("y1_im", y1i, fdiv2(b + d));
      check("y2_re", y2r, fdiv2(a - c));
      check("y2_im", y2i, fdiv2(b - d));
    end else begin
      check("y1_re", y1r, a);
      check("y1_im", y1i, b);
      check("y2_re", y2r, c);
      check("y2_im", y2i, d);
    end
  endtask

  function automatic int rnd();
    return int'($urandom_range(65535)) - 32768;
  endfunction

  initial begin
    apply(32767, 32767, 32767, 32767, 1'b1);
    apply(-32768, -32768, -32768, -32768, 1'b1);
    apply(32767, -32768, -32768, 32767, 1'b1);
    apply(3, -3, 0, 0, 1'b1);
    apply(-1, 1, 0, 0, 1'b1);
    for (int i = 0; i < 2000; i++) apply(rnd(), rnd(), rnd(), rnd(), i[0]);
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
