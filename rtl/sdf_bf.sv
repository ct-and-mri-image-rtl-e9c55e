// sdf_bf: radix-2 butterfly of a single-path delay feedback stage.
//
// x1 is the sample coming back out of the stage's feedback delay, x2 the new
// sample entering the stage. With s = 1 the unit computes the scaled
// butterfly y1 = (x1 + x2) / 2 (sent on down the pipeline) and
// y2 = (x1 - x2) / 2 (written into the feedback delay). With s = 0 the
// multiplexers pass y1 = x1 and y2 = x2 unchanged, so the delay is filled
// with new input while its old content (the differences of the previous
// block) is sent on. The halving after each adder keeps the word width
// constant through the pipeline; it is an arithmetic shift of the DW+1 bit
// sum, i.e. rounding toward minus infinity (the rounding mode is this
// implementation's choice).
//
// The structure (two adders and two subtractors, each followed by a halving,
// and four 2:1 multiplexers selected by s) follows the document's butterfly.
//
// Purely combinational, no latency.
module sdf_bf #(
  parameter int unsigned DW = 16
) (
  input  logic                 s,
  input  logic signed [DW-1:0] x1_re,
  input  logic signed [DW-1:0] x1_im,
  input  logic signed [DW-1:0] x2_re,
  input  logic signed [DW-1:0] x2_im,
  output logic signed [DW-1:0] y1_re,
  output logic signed [DW-1:0] y1_im,
  output logic signed [DW-1:0] y2_re,
  output logic signed [DW-1:0] y2_im
);
  // DW+1 bit sums; the halved result is bits [DW:1] and bit 0 is dropped.
  logic signed [DW:0] sum_re, sum_im, dif_re, dif_im;
  logic               unused_lsb;
  assign unused_lsb = ^{sum_re[0], sum_im[0], dif_re[0], dif_im[0]};

  always_comb begin
    sum_re = {x1_re[DW-1], x1_re} + {x2_re[DW-1], x2_re};
    sum_im = {x1_im[DW-1], x1_im} + {x2_im[DW-1], x2_im};
    dif_re = {x1_re[DW-1], x1_re} - {x2_re[DW-1], x2_re};
    dif_im = {x1_im[DW-1], x1_im} - {x2_im[DW-1], x2_im};
    if (s) begin
      y1_re = sum_re[DW:1];
      y1_im = sum_im[DW:1];
      y2_re = dif_re[DW:1];
      y2_im = dif_im[DW:1];
    end else begin
      y1_re = x1_re;
      y1_im = x1_im;
      y2_re = x2_re;
      y2_im = x2_im;
    end
  end
endmodule
