// trivial_mult: the "trivial multiplier" of the radix-2^2 SDF FFT, a
// multiplication by -j that needs no multiplier.
//
// When sel = ~t & s is set, (re, im) becomes (im, -re); otherwise the sample
// passes unchanged. The AND gate with the inverted T input, the two 2:1
// multiplexers and the negation follow the trivial-multiplier circuit of the
// design. The negation saturates: -(-2^(DW-1)) gives 2^(DW-1)-1 instead of
// wrapping, which is this implementation's choice.
//
// Purely combinational, no latency.
module trivial_mult #(
  parameter int unsigned DW = 16
) (
  input  logic                 t,       // quarter-select input, active low
  input  logic                 s,       // butterfly phase input
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);
  localparam logic signed [DW-1:0] MINV = {1'b1, {(DW-1){1'b0}}};
  localparam logic signed [DW-1:0] MAXV = {1'b0, {(DW-1){1'b1}}};

  logic                 sel;
  logic signed [DW-1:0] neg_re;

  assign sel    = ~t & s;
  assign neg_re = (in_re == MINV) ? MAXV : -in_re;

  always_comb begin
    out_re = sel ? in_im  : in_re;
    out_im = sel ? neg_re : in_im;
  end
endmodule
