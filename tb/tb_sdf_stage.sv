// tb_sdf_stage: self-checking test of one SDF stage.
//
// A BF2I stage with L = 4 and a BF2II stage with L = 2 (with the -j
// multiplier) each get a stream of random samples with random stalls, their
// control bits taken from a sample counter as in the pipeline. The model
// multiplies by -j the BF2II input samples in the last quarter of each
// 4L block, then forms for each block of 2L samples the half-sums of
// samples n and n+L (first half of the output block) and their
// half-differences (second half). Output sample q must leave the stage after
// the input sample q + L has been accepted, i.e. L + 1 samples after q
// entered.
module tb_sdf_stage;
  logic clk = 1'b0, rst_n, en;
  logic signed [15:0] ir, ii, ar, ai, br, bi;
  logic s_a, s_b, t_b;
  int checks = 0, failures = 0;
  int xr_a [$], xi_a [$], xr_b [$], xi_b [$];
  int t;

  always #5 clk = ~clk;

  sdf_stage #(.L(4), .DW(16), .TRIV(1'b0)) dut_a (.clk(clk), .rst_n(rst_n), .en(en),
    .s(s_a), .t(1'b1), .in_re(ir), .in_im(ii), .out_re(ar), .out_im(ai));
  sdf_stage #(.L(2), .DW(16), .TRIV(1'b1)) dut_b (.clk(clk), .rst_n(rst_n), .en(en),
    .s(s_b), .t(t_b), .in_re(ir), .in_im(ii), .out_re(br), .out_im(bi));

  function automatic int fdiv2(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  // Expected output q of a stage with delay L from its (already -j
  // multiplied) input history.
  function automatic void expect_out(ref int hr [$], ref int hi [$], input int q, input int L,
                                     output int er, output int ei);
    int qq = q % (2 * L);
    if (qq < L) begin
      er = fdiv2(hr[q] + hr[q + L]);
      ei = fdiv2(hi[q] + hi[q + L]);
    end else begin
      er = fdiv2(hr[q - L] - hr[q]);
      ei = fdiv2(hi[q - L] - hi[q]);
    end
  endfunction

  task automatic check(string what, int gr, int gi, int er, int ei);
    checks++;
    if (gr != er || gi != ei) begin
      failures++;
      if (failures < 10) $display("t=%0d %s: got (%0d,%0d) expected (%0d,%0d)",
                                  t, what, gr, gi, er, ei);
    end
  endtask

  initial begin
    int er, ei, vr, vi, p;
    rst_n = 1'b0; en = 1'b0; ir = '0; ii = '0;
    s_a = 1'b0; s_b = 1'b0; t_b = 1'b1;
    t = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    while (t < 400) begin
      en = ($urandom_range(4) != 0);
      vr = int'($urandom_range(65535)) - 32767;
      vi = int'($urandom_range(65535)) - 32767;
      ir = 16'(vr); ii = 16'(vi);
      s_a = t[2];
      s_b = t[1];
      t_b = ~t[2];
      @(posedge clk);
      if (en) begin
        xr_a.push_back(vr); xi_a.push_back(vi);
        p = t % 8;
        if (p >= 6) begin           // -j in the last quarter of the 8-sample block
          xr_b.push_back(vi); xi_b.push_back(-vr);
        end else begin
          xr_b.push_back(vr); xi_b.push_back(vi);
        end
        #1;
        if (t >= 4) begin
          expect_out(xr_a, xi_a, t - 4, 4, er, ei);
          check("BF2I L=4", int'(ar), int'(ai), er, ei);
        end
        if (t >= 2) begin
          expect_out(xr_b, xi_b, t - 2, 2, er, ei);
          check("BF2II L=2", int'(br), int'(bi), er, ei);
        end
        t++;
      end else #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
