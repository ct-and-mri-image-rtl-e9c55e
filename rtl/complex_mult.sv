// complex_mult: the twiddle multiplier between radix-2^2 stage pairs.
//
// Computes (a_re + j a_im) * (w_re + j w_im) with four real products and two
// adders, rounds the result back to DW bits (round half up after dropping the
// TW-2 twiddle fraction bits) and saturates it to the DW-bit range. The
// result is registered: it appears one enabled clock cycle after its inputs
// (latency 1 sample). Rounding, saturation and the output register are this
// implementation's choices; the document gives the multiplier's place in
// the pipeline, not its insides.
module complex_mult #(
  parameter int unsigned DW = 16,
  parameter int unsigned TW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] a_re,
  input  logic signed [DW-1:0] a_im,
  input  logic signed [TW-1:0] w_re,
  input  logic signed [TW-1:0] w_im,
  output logic signed [DW-1:0] p_re,
  output logic signed [DW-1:0] p_im
);
  localparam int unsigned PW = DW + TW + 1;
  localparam int unsigned FB = TW - 2;            // twiddle fraction bits
  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (FB - 1);
  localparam logic signed [PW-1:0] MAXV = PW'((longint'(1) << (DW - 1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(longint'(1) << (DW - 1));

  logic signed [PW-1:0] xa_re, xa_im, xw_re, xw_im;
  logic signed [PW-1:0] acc_re, acc_im, r_re, r_im;

  function automatic logic signed [DW-1:0] sat(logic signed [PW-1:0] v);
    if (v > MAXV) return MAXV[DW-1:0];
    if (v < MINV) return MINV[DW-1:0];
    return v[DW-1:0];
  endfunction

  always_comb begin
    xa_re  = PW'(a_re);
    xa_im  = PW'(a_im);
    xw_re  = PW'(w_re);
    xw_im  = PW'(w_im);
    acc_re = xa_re * xw_re - xa_im * xw_im;
    acc_im = xa_re * xw_im + xa_im * xw_re;
    r_re   = (acc_re + HALF) >>> FB;
    r_im   = (acc_im + HALF) >>> FB;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      p_re <= '0;
      p_im <= '0;
    end else if (en) begin
      p_re <= sat(r_re);
      p_im <= sat(r_im);
    end
endmodule
