// tb_sdf_fft_core: end-to-end test of the SDF FFT core at reduced sizes.
//
// Three cores run side by side: N = 16 (the size built and measured in
// hardware), N = 64 (three stage pairs, two twiddle multipliers) and N = 32
// (odd number of stages, lone BF2I at the end). Each streams 8 transforms
// of four patterns back to back with random input stalls, and every result
// is compared with a double-precision DFT / N. The test also counts how
// often each pipeline mechanism happened in the N = 64 core: feedback-delay
// fill cycles, butterfly cycles, -j multiplications, non-trivial twiddle
// multiplications, stalled cycles and transforms that followed another
// without a gap; each must happen at least once.
module tb_sdf_fft_core;
  import sdf_fft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned NA = 16, NBB = 64, NC = 32;

  int checks, failures;
  int ca, fa, ga, cb, fb, gb, cc, fc, gc;
  logic da, db, dc;

  // N = 16
  logic ra, iva, ova; logic signed [15:0] ira, iia, ora, oia; logic [3:0] oxa;
  sdf_fft_core #(.N(NA)) dut_a (.clk(clk), .rst_n(ra), .in_valid(iva), .in_re(ira), .in_im(iia),
    .out_valid(ova), .out_re(ora), .out_im(oia), .out_index(oxa));
  fft_stream_checker #(.N(NA), .NF(8), .LAT(latency(NA)), .TOL(2)) chk_a (.clk(clk), .rst_n(ra),
    .in_valid(iva), .in_re(ira), .in_im(iia), .out_valid(ova), .out_re(ora), .out_im(oia),
    .out_index(oxa), .checks(ca), .failures(fa), .gaps(ga), .done(da));

  // N = 64
  logic rb, ivb, ovb; logic signed [15:0] irb, iib, orb, oib; logic [5:0] oxb;
  sdf_fft_core #(.N(NBB)) dut_b (.clk(clk), .rst_n(rb), .in_valid(ivb), .in_re(irb), .in_im(iib),
    .out_valid(ovb), .out_re(orb), .out_im(oib), .out_index(oxb));
  fft_stream_checker #(.N(NBB), .NF(8), .LAT(latency(NBB)), .TOL(3)) chk_b (.clk(clk), .rst_n(rb),
    .in_valid(ivb), .in_re(irb), .in_im(iib), .out_valid(ovb), .out_re(orb), .out_im(oib),
    .out_index(oxb), .checks(cb), .failures(fb), .gaps(gb), .done(db));

  // N = 32
  logic rc, ivc, ovc; logic signed [15:0] irc, iic, orc, oic; logic [4:0] oxc;
  sdf_fft_core #(.N(NC)) dut_c (.clk(clk), .rst_n(rc), .in_valid(ivc), .in_re(irc), .in_im(iic),
    .out_valid(ovc), .out_re(orc), .out_im(oic), .out_index(oxc));
  fft_stream_checker #(.N(NC), .NF(8), .LAT(latency(NC)), .TOL(3)) chk_c (.clk(clk), .rst_n(rc),
    .in_valid(ivc), .in_re(irc), .in_im(iic), .out_valid(ovc), .out_re(orc), .out_im(oic),
    .out_index(oxc), .checks(cc), .failures(fc), .gaps(gc), .done(dc));

  // Mechanism counters on the N = 64 core.
  int n_fill, n_bf, n_negj, n_twid, n_stall, n_b2b;
  int prev_out_frames;
  initial begin
    n_fill = 0; n_bf = 0; n_negj = 0; n_twid = 0; n_stall = 0; n_b2b = 0;
  end
  always @(posedge clk) if (rb) begin
    if (!ivb) n_stall++;
    else begin
      if (dut_b.bf_s[0]) n_bf++; else n_fill++;
      if (dut_b.bf_s[1] && !dut_b.triv_t[1]) n_negj++;
      if (dut_b.g_st[1].g_mul.w_im != 0) n_twid++;
      // a new transform enters while the previous one is still inside
      if (dut_b.u_ctl.cnt == 0 && ovb) n_b2b++;
    end
  end

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-28s happened %0d times", what, n);
    if (n == 0) failures++;
  endtask

  initial begin
    // let the checkers clear their flags before waiting on them
    repeat (4) @(posedge clk);
    wait (da && db && dc);
    repeat (2) @(posedge clk);
    checks   = ca + cb + cc;
    failures = fa + fb + fc;
    need("feedback-delay fill (S=0)", n_fill);
    need("butterfly (S=1)", n_bf);
    need("trivial -j multiply", n_negj);
    need("twiddle multiply", n_twid);
    need("input stall", n_stall);
    need("back-to-back transforms", n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc + 1);
    $finish;
  end
endmodule
