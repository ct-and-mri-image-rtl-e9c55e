// sdf_fft_core: N-point radix-2^2 single-path delay feedback (SDF)
// decimation-in-frequency FFT core, the top of the design.
//
// The core takes one complex sample per accepted clock (in_valid) in natural
// order and streams out one complex result per accepted clock in bit-reversed
// frequency order, continuously and without gaps between transforms. It is a
// chain of log2(N) SDF stages with feedback delays N/2, N/4, ..., 1:
// BF2I / BF2II pairs, the BF2II with a trivial -j multiplier in front, and a
// complex twiddle multiplier with its own twiddle table after every pair but
// the last (log4(N) - 1 multipliers, e.g. 5 for N = 4096). One control unit
// drives every stage from a single sample counter. Every butterfly halves
// its result, so the outputs are X[k] / N with X the DFT of the input.
//
// Interface: in_valid/in_re/in_im in; out_valid/out_re/out_im/out_index out,
// out_index being the natural frequency index k of the result. Timing: the
// pipeline advances only on accepted samples (in_valid = 1); a result leaves
// one clock after the sample that pushes it out, and the first result of a
// transform leaves after latency(N) = N - 1 + log2(N) - 1 + (log4(N) - 1)
// further samples (4111 for N = 4096). Since the feedback delays must be
// pushed, the last transform of a stream comes out only while the next
// transform (or filler samples) goes in.
//
// From the document: the radix-2^2 SDF DIF structure, N = 4096, the stage
// delays, the half-scaling butterfly, the -j multiplier and the
// per-multiplier twiddle tables. This implementation's choices: 16-bit data
// and twiddle words, registers after every stage and multiplier, rounding
// and saturation, and the valid-based flow control. N must be a power of two
// (>= 4); with an odd log2(N) the last stage is a lone BF2I.
module sdf_fft_core
  import sdf_fft_pkg::*;
#(
  parameter int unsigned N  = DEFAULT_N,
  parameter int unsigned DW = DEFAULT_DW,
  parameter int unsigned TW = DEFAULT_TW
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [DW-1:0]        in_re,
  input  logic signed [DW-1:0]        in_im,
  output logic                        out_valid,
  output logic signed [DW-1:0]        out_re,
  output logic signed [DW-1:0]        out_im,
  output logic [num_stages(N)-1:0]    out_index
);
  localparam int unsigned NB = num_stages(N);
  localparam int unsigned NM = num_mults(N);

  logic [NB-1:0] bf_s, triv_t;
  logic [NB-1:0] tw_addr [NM > 0 ? NM : 1];
  logic          ctl_valid;
  logic [NB-1:0] ctl_index;

  fft_control #(.N(N)) u_ctl (
    .clk(clk), .rst_n(rst_n), .en(in_valid),
    .bf_s(bf_s), .triv_t(triv_t), .tw_addr(tw_addr),
    .out_valid(ctl_valid), .out_index(ctl_index)
  );

  // st_re/st_im[s] is the input of stage s; [NB] is the last stage's output.
  logic signed [DW-1:0] st_re [NB+1];
  logic signed [DW-1:0] st_im [NB+1];
  assign st_re[0] = in_re;
  assign st_im[0] = in_im;

  for (genvar s = 0; s < NB; s++) begin : g_st
    logic signed [DW-1:0] o_re, o_im;

    sdf_stage #(.L(stage_len(N, s)), .DW(DW), .TRIV(s % 2 == 1)) u_stage (
      .clk(clk), .rst_n(rst_n), .en(in_valid),
      .s(bf_s[s]), .t(triv_t[s]),
      .in_re(st_re[s]), .in_im(st_im[s]),
      .out_re(o_re), .out_im(o_im)
    );

    if (mult_after(N, s)) begin : g_mul
      localparam int unsigned M   = (s - 1) / 2;
      localparam int unsigned NPT = 4 * stage_len(N, s);
      logic signed [TW-1:0] w_re, w_im;

      twiddle_rom #(.NPT(NPT), .TW(TW)) u_rom (
        .addr(tw_addr[M][$clog2(NPT)-1:0]), .w_re(w_re), .w_im(w_im)
      );
      complex_mult #(.DW(DW), .TW(TW)) u_mul (
        .clk(clk), .rst_n(rst_n), .en(in_valid),
        .a_re(o_re), .a_im(o_im), .w_re(w_re), .w_im(w_im),
        .p_re(st_re[s+1]), .p_im(st_im[s+1])
      );
    end else begin : g_nomul
      assign st_re[s+1] = o_re;
      assign st_im[s+1] = o_im;
    end
  end

  // The last stage's output register already holds the result; the valid
  // flag and index are registered alongside it.
  assign out_re = st_re[NB];
  assign out_im = st_im[NB];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_index <= '0;
    end else begin
      out_valid <= ctl_valid;
      if (ctl_valid) out_index <= ctl_index;
    end

  initial assert (N >= 4 && (N & (N - 1)) == 0)
    else $error("sdf_fft_core: N must be a power of two, at least 4");
endmodule
