// tb_mri_recon_2d: MRI-style reconstruction of a 256 x 256 image from its
// k-space through one 256-point core.
//
// The testbench builds a phantom image (nested ellipses), computes its
// k-space with a double-precision 2-D DFT, scales it to the input range and
// rounds it to integers. The core then performs the 2-D inverse transform
// in two passes: first the 256 rows, then the 256 columns of the row
// results. Each inverse transform is formed as conj(FFT(conj(x))); the
// core's 1/N scaling per pass gives the usual 1/N^2 of the inverse 2-D DFT.
// The testbench conjugates, reorders (by out_index) and transposes between
// the passes. Every reconstructed pixel is compared with a double-precision
// inverse 2-D DFT of the same integer k-space.
//
// A 256 x 256 k-space has a DC term of 65536 times the mean pixel value, so
// with 16-bit words a pixel of value 1.0 of this phantom would come out as
// less than two LSB after the two passes. The core is therefore built with
// 24-bit data and 24-bit twiddles here (about 420 LSB per unit pixel).
module tb_mri_recon_2d;
  import sdf_fft_pkg::*;

  localparam int N   = 256;
  localparam int DW  = 24;
  localparam int TOL = 6;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n, in_valid, out_valid;
  logic signed [DW-1:0] in_re, in_im, out_re, out_im;
  logic [7:0]           out_index;

  sdf_fft_core #(.N(N), .DW(DW), .TW(24)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_re(out_re), .out_im(out_im), .out_index(out_index)
  );

  real ct [N], st [N];
  real img [N*N];
  real kr [N*N], ki [N*N];          // k-space, then its reference inverse
  real tr [N*N], ti [N*N];          // scratch
  int  qr [N*N], qi [N*N];          // integer k-space fed to the core
  int  hr [N*N], hi [N*N];          // core results of the current pass
  int  checks = 0, failures = 0, max_err = 0, outs = 0;
  int  pass_in [N*N], pass_im [N*N];

  // 1-D DFT along rows (stride 1) or columns (stride N), sign -1 forward,
  // +1 inverse (the inverse also divides by N).
  task automatic dft_lines(ref real ar [N*N], ref real ai [N*N],
                           ref real br [N*N], ref real bi [N*N],
                           input bit cols, input bit inv);
    for (int l = 0; l < N; l++)
      for (int k = 0; k < N; k++) begin
        real sr, si, sg;
        int  idx;
        sr = 0.0; si = 0.0;
        sg = inv ? 1.0 : -1.0;
        for (int n = 0; n < N; n++) begin
          int e;
          e   = (k * n) % N;
          idx = cols ? n * N + l : l * N + n;
          sr += ar[idx] * ct[e] - sg * ai[idx] * st[e];
          si += ai[idx] * ct[e] + sg * ar[idx] * st[e];
        end
        idx = cols ? k * N + l : l * N + k;
        br[idx] = inv ? sr / N : sr;
        bi[idx] = inv ? si / N : si;
      end
  endtask

  function automatic real ell(int x, int y, real cx, real cy, real a, real b);
    real dx, dy;
    dx = (real'(x) - cx) / a;
    dy = (real'(y) - cy) / b;
    return (dx * dx + dy * dy <= 1.0) ? 1.0 : 0.0;
  endfunction

  // Streams N transforms of N samples (pass_in/pass_im, transform-major) into
  // the core, with random stalls and filler, and stores the conjugated
  // results in natural order in hr/hi (transform-major).
  task automatic run_pass();
    int sent;
    sent = 0;
    outs = 0;
    while (outs < N * N) begin
      if (sent < N * N + int'(latency(N)) + 1 && $urandom_range(7) != 0) begin
        in_valid <= 1'b1;
        in_re    <= (sent < N * N) ? DW'(pass_in[sent]) : '0;
        in_im    <= (sent < N * N) ? DW'(pass_im[sent]) : '0;
        sent++;
      end else begin
        in_valid <= 1'b0;
      end
      @(posedge clk);
      if (out_valid && outs < N * N) begin
        hr[(outs / N) * N + int'(out_index)] = int'(out_re);
        hi[(outs / N) * N + int'(out_index)] = -int'(out_im);
        outs++;
      end
    end
    in_valid <= 1'b0;
    // drain: the core keeps its state; reset it for the next pass
    rst_n <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
  endtask

  initial begin
    real mx, sc;
    rst_n = 1'b0; in_valid = 1'b0; in_re = '0; in_im = '0;
    for (int k = 0; k < N; k++) begin
      ct[k] = $cos(2.0 * PI * k / N);
      st[k] = $sin(2.0 * PI * k / N);
    end
    // Phantom: head outline, darker interior, two bright spots, one dark spot.
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++)
        img[y*N+x] = 1.0 * ell(x, y, 128.0, 128.0, 92.0, 118.0)
                   - 0.6 * ell(x, y, 128.0, 130.0, 84.0, 108.0)
                   + 0.4 * ell(x, y, 100.0, 110.0, 18.0, 30.0)
                   + 0.3 * ell(x, y, 160.0, 150.0, 24.0, 16.0)
                   - 0.2 * ell(x, y, 128.0, 190.0, 10.0, 10.0);
    for (int i = 0; i < N * N; i++) begin
      tr[i] = img[i];
      ti[i] = 0.0;
    end
    dft_lines(tr, ti, kr, ki, 1'b0, 1'b0);   // rows
    dft_lines(kr, ki, tr, ti, 1'b1, 1'b0);   // columns: tr/ti = k-space
    mx = 0.0;
    for (int i = 0; i < N * N; i++) begin
      if (tr[i] > mx) mx = tr[i];
      if (-tr[i] > mx) mx = -tr[i];
      if (ti[i] > mx) mx = ti[i];
      if (-ti[i] > mx) mx = -ti[i];
    end
    sc = 0.9 * real'(1 << (DW - 1)) / mx;
    for (int i = 0; i < N * N; i++) begin
      qr[i] = int'($floor(tr[i] * sc + 0.5));
      qi[i] = int'($floor(ti[i] * sc + 0.5));
      kr[i] = real'(qr[i]);
      ki[i] = real'(qi[i]);
    end
    // Reference: inverse 2-D DFT of the integer k-space.
    dft_lines(kr, ki, tr, ti, 1'b0, 1'b1);
    dft_lines(tr, ti, kr, ki, 1'b1, 1'b1);   // kr/ki = reference image
    $display("k-space scaled by %f; a pixel of value 1.0 is %0.1f LSB", sc, sc);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Pass 1: inverse transform of every k-space row.
    for (int i = 0; i < N * N; i++) begin
      pass_in[i] = qr[i];
      pass_im[i] = -qi[i];
    end
    run_pass();
    // Pass 2: inverse transform of every column of the row results.
    for (int c = 0; c < N; c++)
      for (int r = 0; r < N; r++) begin
        pass_in[c*N+r] = hr[r*N+c];
        pass_im[c*N+r] = -hi[r*N+c];
      end
    run_pass();
    // hr/hi now hold the image, column-major.
    for (int c = 0; c < N; c++)
      for (int r = 0; r < N; r++) begin
        int er, ei;
        er = int'($floor(real'(hr[c*N+r]) - kr[r*N+c] + 0.5));
        ei = int'($floor(real'(hi[c*N+r]) - ki[r*N+c] + 0.5));
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        checks++;
        if (er > TOL || ei > TOL) begin
          failures++;
          if (failures < 10) $display("pixel (%0d,%0d) = (%0d,%0d), expected (%f,%f)",
                                      r, c, hr[c*N+r], hi[c*N+r], kr[r*N+c], ki[r*N+c]);
        end
      end
    $display("256 x 256 image reconstructed, largest pixel error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
