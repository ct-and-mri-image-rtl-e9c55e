// twiddle_rom: twiddle factor storage for the multiplier that follows a
// BF2II stage whose sub-transform has NPT points.
//
// Entry e holds W^e = exp(-j*2*pi*e/NPT) = cos(2*pi*e/NPT) - j*sin(2*pi*e/NPT)
// for e = 0 .. 3*NPT/4 - 1, the exponents the radix-2^2 decomposition can ask
// for. Values are signed fixed point with TW-2 fraction bits, so +1.0 is
// 2^(TW-2) and is exact; each entry is cos/sin * 2^(TW-2) rounded to the
// nearest integer. The table is computed at elaboration by a constant
// function, so no data file is needed. The document stores precomputed
// twiddle factors in a look-up memory; the format and the table depth are
// this implementation's choices.
//
// Read is combinational from addr.
module twiddle_rom #(
  parameter int unsigned NPT = 4096,  // points of the sub-transform
  parameter int unsigned TW  = 16     // twiddle word (each of re / im)
) (
  input  logic [$clog2(NPT)-1:0]  addr,
  output logic signed [TW-1:0]    w_re,
  output logic signed [TW-1:0]    w_im
);
  localparam int unsigned DEPTH = (NPT * 3) / 4;
  typedef logic [2*TW-1:0] tbl_t [DEPTH];

  function automatic tbl_t make_table();
    tbl_t  t;
    real   ang, sc;
    logic signed [TW-1:0] c, s;
    sc = real'(longint'(1) << (TW - 2));
    for (int e = 0; e < int'(DEPTH); e++) begin
      ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(NPT);
      c   = TW'(longint'($floor($cos(ang) * sc + 0.5)));
      s   = TW'(longint'($floor(-$sin(ang) * sc + 0.5)));
      t[e] = {c, s};
    end
    return t;
  endfunction

  localparam tbl_t TABLE = make_table();

  logic [2*TW-1:0] word;
  assign word = (int'(addr) < int'(DEPTH)) ? TABLE[addr] : {TW'(1 << (TW - 2)), TW'(0)};
  assign w_re = word[2*TW-1:TW];
  assign w_im = word[TW-1:0];
endmodule
