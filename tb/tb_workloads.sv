// tb_workloads: the transform lengths of the imaging workloads and of the
// 1024-point example pipeline.
//
// MRI images of 256 x 256 need 256-point transforms (one per k-space row and
// column); a 512 x 512 CT slice needs 512-point transforms, one per view.
// The 1024-point core is the five-pair pipeline with four twiddle
// multipliers (W1 ... W4). Three cores, N = 256, 512 and 1024, each stream a
// run of transforms back to back (8 rows, 6 views, 3 transforms; four input
// patterns, random stalls), and every result is compared with a
// double-precision DFT / N.
module tb_workloads;
  import sdf_fft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned NM = 256, NCT = 512, NK = 1024;

  int ca, fa, ga, cb, fb, gb, cc, fc, gc;
  logic da, db, dc;

  logic ra, iva, ova; logic signed [15:0] ira, iia, ora, oia; logic [7:0] oxa;
  sdf_fft_core #(.N(NM)) dut_mri (.clk(clk), .rst_n(ra), .in_valid(iva), .in_re(ira), .in_im(iia),
    .out_valid(ova), .out_re(ora), .out_im(oia), .out_index(oxa));
  fft_stream_checker #(.N(NM), .NF(8), .LAT(latency(NM)), .TOL(4)) chk_mri (.clk(clk), .rst_n(ra),
    .in_valid(iva), .in_re(ira), .in_im(iia), .out_valid(ova), .out_re(ora), .out_im(oia),
    .out_index(oxa), .checks(ca), .failures(fa), .gaps(ga), .done(da));

  logic rb, ivb, ovb; logic signed [15:0] irb, iib, orb, oib; logic [8:0] oxb;
  sdf_fft_core #(.N(NCT)) dut_ct (.clk(clk), .rst_n(rb), .in_valid(ivb), .in_re(irb), .in_im(iib),
    .out_valid(ovb), .out_re(orb), .out_im(oib), .out_index(oxb));
  fft_stream_checker #(.N(NCT), .NF(6), .LAT(latency(NCT)), .TOL(5)) chk_ct (.clk(clk), .rst_n(rb),
    .in_valid(ivb), .in_re(irb), .in_im(iib), .out_valid(ovb), .out_re(orb), .out_im(oib),
    .out_index(oxb), .checks(cb), .failures(fb), .gaps(gb), .done(db));

  logic rc, ivc, ovc; logic signed [15:0] irc, iic, orc, oic; logic [9:0] oxc;
  sdf_fft_core #(.N(NK)) dut_1k (.clk(clk), .rst_n(rc), .in_valid(ivc), .in_re(irc), .in_im(iic),
    .out_valid(ovc), .out_re(orc), .out_im(oic), .out_index(oxc));
  fft_stream_checker #(.N(NK), .NF(3), .LAT(latency(NK)), .TOL(5)) chk_1k (.clk(clk), .rst_n(rc),
    .in_valid(ivc), .in_re(irc), .in_im(iic), .out_valid(ovc), .out_re(orc), .out_im(oic),
    .out_index(oxc), .checks(cc), .failures(fc), .gaps(gc), .done(dc));

  initial begin
    // let the checkers clear their flags before waiting on them
    repeat (4) @(posedge clk);
    wait (da && db && dc);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc + 1);
    $finish;
  end
endmodule
