// fft_control: control unit of the radix-2^2 SDF FFT pipeline.
//
// One counter cnt (log2 N bits) counts accepted input samples modulo N; a
// second, saturating counter tells when the pipeline is full. Each stage s
// sees the stream with a fixed lag of stage_off(N, s) samples, so its frame
// position is pos(s) = cnt - stage_off(N, s) (mod N). From it:
//   bf_s[s]   = bit log2(L(s)) of pos(s): 0 while the stage's feedback delay
//               is being filled, 1 while it computes butterflies;
//   triv_t[s] = the inverted next-higher bit, the active-low T input of the
//               -j multiplier in front of a BF2II stage (it multiplies when
//               both bits are 1, i.e. in the last quarter of its block);
//   tw_addr[m] = twiddle exponent for multiplier m: with N' the length of
//               its sub-transform, p its position in the N' block,
//               n3 = p mod N'/4 and f the bit-reversed top two bits of p,
//               the exponent is n3 * f.
// The counter with constant offsets replaces the chain of small control
// delays drawn under the stages of the document's pipeline figure; it gives
// the same bits. out_valid says that the sample leaving the last stage in
// this cycle belongs to a complete transform and out_index gives its
// frequency index, the bit reverse of its position.
//
// Everything advances on en (an accepted input sample); outputs are
// combinational from the counters.
module fft_control
  import sdf_fft_pkg::*;
#(
  parameter int unsigned N = 4096
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  output logic [num_stages(N)-1:0]     bf_s,
  output logic [num_stages(N)-1:0]     triv_t,
  output logic [num_stages(N)-1:0]     tw_addr [num_mults(N) > 0 ? num_mults(N) : 1],
  output logic                         out_valid,
  output logic [num_stages(N)-1:0]     out_index
);
  localparam int unsigned NB  = num_stages(N);
  localparam int unsigned NM  = num_mults(N);
  localparam int unsigned LAT = latency(N);
  localparam int unsigned FW  = $clog2(LAT + 1);

  logic [NB-1:0] cnt;
  logic [FW-1:0] fill;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt  <= '0;
      fill <= '0;
    end else if (en) begin
      cnt <= cnt + 1'b1;
      if (fill != FW'(LAT)) fill <= fill + 1'b1;
    end

  for (genvar s = 0; s < NB; s++) begin : g_stage
    localparam int unsigned LB = $clog2(stage_len(N, s));
    logic [NB-1:0] pos;
    assign pos       = cnt - NB'(stage_off(N, s));
    assign bf_s[s]   = pos[LB];
    if (LB + 1 < NB) begin : g_t
      assign triv_t[s] = ~pos[LB+1];
    end else begin : g_t0
      assign triv_t[s] = 1'b1;   // no quarter bit: never multiply by -j
    end
  end

  if (NM == 0) begin : g_nomult
    assign tw_addr[0] = '0;
  end
  for (genvar m = 0; m < NM; m++) begin : g_mult
    localparam int unsigned ST  = mult_stage(m);
    localparam int unsigned QB  = $clog2(stage_len(N, ST));  // log2(N'/4)
    logic [NB-1:0] pos, n3;
    logic [1:0]    f;
    assign pos = cnt - NB'(mult_off(N, ST));
    assign n3  = pos & NB'((1 << QB) - 1);
    assign f   = {pos[QB], pos[QB+1]};
    assign tw_addr[m] = (f[0] ? n3 : '0) + (f[1] ? (n3 << 1) : '0);
  end

  logic [NB-1:0] opos;
  assign opos      = cnt - NB'(LAT);
  assign out_valid = en && (fill == FW'(LAT));
  always_comb
    for (int b = 0; b < int'(NB); b++) out_index[b] = opos[NB-1-b];
endmodule
