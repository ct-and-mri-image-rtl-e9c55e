// sdf_fft_pkg: shared constants and elaboration-time helpers of the radix-2^2
// single-path delay feedback (SDF) decimation-in-frequency FFT.
//
// The pipeline has NST = log2(N) butterfly stages. Stage s holds a feedback
// delay of L(s) = N >> (s+1) samples. Even stages are BF2I, odd stages are
// BF2II (with the trivial -j multiplier in front). A complex twiddle
// multiplier follows every BF2II except the last stage, which gives
// log4(N) - 1 multipliers for N a power of four.
//
// Every stage output and every twiddle multiplier output is registered, so
// the stream reaching stage s lags the core input by stage_off(N, s) samples.
// The control unit derives all stage control bits from one sample counter
// minus these constant offsets; that is the same thing as the chain of small
// control delays drawn under the stages of the classic SDF diagram.
package sdf_fft_pkg;

  localparam int unsigned DEFAULT_N  = 4096;  // transform length of the core
  localparam int unsigned DEFAULT_DW = 16;    // data word (each of re / im)
  localparam int unsigned DEFAULT_TW = 16;    // twiddle word (each of re / im)

  // Number of stages, log2(n).
  function automatic int unsigned num_stages(int unsigned n);
    return $clog2(n);
  endfunction

  // Feedback delay of stage s.
  function automatic int unsigned stage_len(int unsigned n, int unsigned s);
    return n >> (s + 1);
  endfunction

  // True where a twiddle multiplier follows stage s (every BF2II but the last stage).
  function automatic bit mult_after(int unsigned n, int unsigned s);
    return (s % 2 == 1) && (s + 1 < num_stages(n));
  endfunction

  // Number of complex twiddle multipliers.
  function automatic int unsigned num_mults(int unsigned n);
    int unsigned c = 0;
    for (int unsigned s = 0; s < num_stages(n); s++)
      if (mult_after(n, s)) c++;
    return c;
  endfunction

  // Samples by which the input of stage s lags the core input.
  function automatic int unsigned stage_off(int unsigned n, int unsigned s);
    int unsigned a = 0;
    for (int unsigned j = 0; j < s; j++)
      a += stage_len(n, j) + 1 + (mult_after(n, j) ? 1 : 0);
    return a;
  endfunction

  // Samples by which the input of the twiddle multiplier after stage s lags
  // the core input.
  function automatic int unsigned mult_off(int unsigned n, int unsigned s);
    return stage_off(n, s) + stage_len(n, s) + 1;
  endfunction

  // Index of the stage in front of twiddle multiplier m.
  function automatic int unsigned mult_stage(int unsigned m);
    return 2 * m + 1;
  endfunction

  // Input samples that must enter before the first result leaves:
  // the total feedback delay N-1 plus one register per stage and multiplier.
  function automatic int unsigned latency(int unsigned n);
    return stage_off(n, num_stages(n) - 1) + stage_len(n, num_stages(n) - 1);
  endfunction

endpackage
