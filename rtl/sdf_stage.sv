// sdf_stage: one single-path delay feedback stage, BF2I or BF2II.
//
// A stage is a butterfly (sdf_bf) whose x1 input and y2 output close a loop
// through a feedback delay of L samples (delay_buffer). While s = 0 the
// incoming L samples are written into the delay and the delay's previous
// content leaves the stage; while s = 1 each incoming sample meets the
// sample that entered L samples earlier, their half-sum leaves the stage and
// their half-difference goes into the delay. A BF2II stage (TRIV = 1) has
// the trivial -j multiplier (trivial_mult) in front of its butterfly, driven
// by the control bits t and s. The stage output is registered, so the
// stream leaves the stage L + 1 samples after it entered.
//
// The stage structure (BF2I, and BF2II with the -j multiplier) follows the
// document's pipeline; the output register and the enable are this
// implementation's choices.
//
// All state advances only on en (one sample per enabled clock).
module sdf_stage #(
  parameter int unsigned L    = 4,
  parameter int unsigned DW   = 16,
  parameter bit          TRIV = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 s,      // butterfly phase
  input  logic                 t,      // -j select, active low (BF2II only)
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);
  logic signed [DW-1:0] x2_re, x2_im, x1_re, x1_im;
  logic signed [DW-1:0] y1_re, y1_im, y2_re, y2_im;

  if (TRIV) begin : g_triv
    trivial_mult #(.DW(DW)) u_triv (
      .t(t), .s(s), .in_re(in_re), .in_im(in_im), .out_re(x2_re), .out_im(x2_im)
    );
  end else begin : g_notriv
    assign x2_re = in_re;
    assign x2_im = in_im;
    logic unused_t;
    assign unused_t = t;
  end

  sdf_bf #(.DW(DW)) u_bf (
    .s(s),
    .x1_re(x1_re), .x1_im(x1_im), .x2_re(x2_re), .x2_im(x2_im),
    .y1_re(y1_re), .y1_im(y1_im), .y2_re(y2_re), .y2_im(y2_im)
  );

  delay_buffer #(.L(L), .W(2 * DW)) u_dly (
    .clk(clk), .rst_n(rst_n), .en(en),
    .din({y2_re, y2_im}), .dout({x1_re, x1_im})
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_re <= '0;
      out_im <= '0;
    end else if (en) begin
      out_re <= y1_re;
      out_im <= y1_im;
    end
endmodule
