// tb_sdf_fft_full: the SDF FFT core at its default size, N = 4096 points,
// 16-bit data and twiddles.
//
// Two complete transforms (a complex tone and uniform random samples) are
// streamed back to back with random input stalls and followed by filler
// zeros; all 8192 results are compared with a double-precision DFT / N, and
// the latency to the first result (4111 samples plus the output register)
// and the bit-reversed output order are checked.
module tb_sdf_fft_full;
  import sdf_fft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned N = DEFAULT_N;

  logic                 rst_n, in_valid, out_valid;
  logic signed [15:0]   in_re, in_im, out_re, out_im;
  logic [$clog2(N)-1:0] out_index;
  int                   checks, failures, gaps;
  logic                 done;

  sdf_fft_core dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_re(out_re), .out_im(out_im), .out_index(out_index)
  );

  fft_stream_checker #(.N(N), .NF(2), .LAT(latency(N)), .TOL(6)) chk (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_re(out_re), .out_im(out_im), .out_index(out_index),
    .checks(checks), .failures(failures), .gaps(gaps), .done(done)
  );

  initial begin
    // let the checkers clear their flags before waiting on them
    repeat (4) @(posedge clk);
    wait (done);
    repeat (2) @(posedge clk);
    $display("stalled cycles: %0d", gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
