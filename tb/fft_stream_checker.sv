// fft_stream_checker: stimulus and reference model for the SDF FFT core,
// shared by the end-to-end testbenches.
//
// It drives NF transforms of N samples into the core back to back, followed
// by filler transforms of zeros that push the last results out. Frame f uses
// pattern f % 4: a single complex tone on bin (f * 7 + 1) % N, uniform
// random samples, a unit impulse at a random position, and a constant (DC).
// With GAPS = 1 the input valid is dropped at random (about one cycle in
// four) to exercise the stall behaviour. Each frame's reference is the
// direct DFT computed in double precision and divided by N, since every
// butterfly of the core halves its result. Every result the core emits for
// a real frame is compared with the reference at the index the core reports,
// within TOL LSB per component; the order of indices (bit reverse of the
// position in the frame) and the number of samples the core takes before
// its first result (LAT) are checked too. checks/failures count the
// comparisons; done rises when every expected result has been seen.
module fft_stream_checker #(
  parameter int unsigned N    = 16,
  parameter int unsigned DW   = 16,
  parameter int unsigned NF   = 4,
  parameter int unsigned LAT  = 19,
  parameter int unsigned TOL  = 4,
  parameter bit          GAPS = 1'b1
) (
  input  logic                      clk,
  output logic                      rst_n,
  output logic                      in_valid,
  output logic signed [DW-1:0]      in_re,
  output logic signed [DW-1:0]      in_im,
  input  logic                      out_valid,
  input  logic signed [DW-1:0]      out_re,
  input  logic signed [DW-1:0]      out_im,
  input  logic [$clog2(N)-1:0]      out_index,
  output int                        checks,
  output int                        failures,
  output int                        gaps,
  output logic                      done
);
  localparam int unsigned NB   = $clog2(N);
  localparam real         PI   = 3.14159265358979323846;
  localparam int          AMP  = 1 << (DW - 3);
  localparam int unsigned NFL  = (LAT + N - 1) / N + 1;   // filler frames

  int    xr [], xi [];
  real   rr [], ri [];
  real   ct [], st [];
  int    accepted;
  int    outs;
  int    seen_in;
  int    max_err;

  function automatic int unsigned bitrev(int unsigned v);
    int unsigned r = 0;
    for (int b = 0; b < int'(NB); b++) if (v[b]) r[NB-1-b] = 1'b1;
    return r;
  endfunction

  // Input patterns and the reference spectra.
  initial begin
    int bin, pos;
    xr = new[(NF + NFL) * N];
    xi = new[(NF + NFL) * N];
    rr = new[NF * N];
    ri = new[NF * N];
    ct = new[N];
    st = new[N];
    for (int k = 0; k < int'(N); k++) begin
      ct[k] = $cos(2.0 * PI * real'(k) / real'(N));
      st[k] = $sin(2.0 * PI * real'(k) / real'(N));
    end
    for (int i = 0; i < int'((NF + NFL) * N); i++) begin
      xr[i] = 0;
      xi[i] = 0;
    end
    for (int f = 0; f < int'(NF); f++) begin
      bin = (f * 7 + 1) % int'(N);
      pos = $urandom_range(N - 1);
      for (int n = 0; n < int'(N); n++) begin
        case (f % 4)
          0: begin
            xr[f*N+n] = int'($floor(real'(AMP) * ct[(bin * n) % N] + 0.5));
            xi[f*N+n] = int'($floor(real'(AMP) * st[(bin * n) % N] + 0.5));
          end
          1: begin
            xr[f*N+n] = int'($urandom_range(2 * AMP)) - AMP;
            xi[f*N+n] = int'($urandom_range(2 * AMP)) - AMP;
          end
          2: begin
            xr[f*N+n] = (n == pos) ? AMP : 0;
            xi[f*N+n] = (n == pos) ? -AMP / 2 : 0;
          end
          default: begin
            xr[f*N+n] = AMP / 3;
            xi[f*N+n] = -AMP / 5;
          end
        endcase
      end
      for (int k = 0; k < int'(N); k++) begin
        real ar, ai;
        int  e;
        ar = 0.0;
        ai = 0.0;
        for (int n = 0; n < int'(N); n++) begin
          e = (k * n) % N;
          // x * exp(-j 2 pi k n / N)
          ar += real'(xr[f*N+n]) * ct[e] + real'(xi[f*N+n]) * st[e];
          ai += real'(xi[f*N+n]) * ct[e] - real'(xr[f*N+n]) * st[e];
        end
        rr[f*N+k] = ar / real'(N);
        ri[f*N+k] = ai / real'(N);
      end
    end
  end

  // Driver.
  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_re    = '0;
    in_im    = '0;
    accepted = 0;
    gaps     = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (accepted < int'((NF + NFL) * N)) begin
      if (GAPS && ($urandom_range(3) == 0)) begin
        in_valid <= 1'b0;
        gaps++;
      end else begin
        in_valid <= 1'b1;
        in_re    <= DW'(xr[accepted]);
        in_im    <= DW'(xi[accepted]);
        accepted++;
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
  end

  // Monitor.
  initial begin
    checks   = 0;
    failures = 0;
    outs     = 0;
    max_err  = 0;
    seen_in  = 0;
    done     = 1'b0;
    forever begin
      @(posedge clk);
      if (rst_n && out_valid) begin : chk
        int f, p, k, er, ei;
        f = outs / int'(N);
        p = outs % int'(N);
        if (outs == 0) begin
          // The result is registered: the first one is visible after the
          // sample that made it, i.e. after LAT+1 accepted samples.
          checks++;
          if (seen_in != int'(LAT) + 1) begin
            failures++;
            $display("latency: first result after %0d samples, expected %0d",
                     seen_in, LAT + 1);
          end
        end
        if (f < int'(NF)) begin
          k = int'(out_index);
          checks++;
          if (k != int'(bitrev(p))) begin
            failures++;
            $display("order: frame %0d position %0d has index %0d, expected %0d",
                     f, p, k, bitrev(p));
          end
          er = int'($floor(real'(out_re) - rr[f*N+k] + 0.5));
          ei = int'($floor(real'(out_im) - ri[f*N+k] + 0.5));
          if (er < 0) er = -er;
          if (ei < 0) ei = -ei;
          if (er > max_err) max_err = er;
          if (ei > max_err) max_err = ei;
          checks++;
          if (er > int'(TOL) || ei > int'(TOL)) begin
            failures++;
            if (failures < 10)
              $display("value: frame %0d X[%0d] = (%0d,%0d), expected (%f,%f)",
                       f, k, out_re, out_im, rr[f*N+k], ri[f*N+k]);
          end
        end
        outs++;
        if (outs == int'(NF * N) && !done) begin
          $display("N=%0d: %0d results checked, largest error %0d LSB", N, outs, max_err);
          done = 1'b1;
        end
      end
      if (rst_n && in_valid) seen_in++;
    end
  end
endmodule
