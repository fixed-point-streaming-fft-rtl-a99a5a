// twiddle_rom: twiddle factors for one radix-2 DIF stage.
//
// A stage whose feedback buffer holds L samples pairs input k with input k+L
// and multiplies their difference by W = exp(-j*2*pi*k/(2L)), k = 0 .. L-1.
// This module holds those L factors as a constant table that is computed at
// elaboration from cos/sin, so no data file is needed:
//   tw_re[k] = round( cos(2*pi*k/(2L)) * 2^TW_FRAC)
//   tw_im[k] = round(-sin(2*pi*k/(2L)) * 2^TW_FRAC)
// with halves rounded away from zero. The words are TW_W bits with TW_FRAC
// fraction bits; two integer bits hold +1.0 and -1.0 exactly.
//
// Interface: addr selects k; tw_re/tw_im follow combinationally (a ROM with
// an asynchronous read, which synthesizes to a small constant multiplexer).
// The table form and the rounding are this design's choices; the document
// gives only the factor exp(-j*theta) and its precision TP.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int L       = 64,
  parameter int TW_W    = fft_pkg::DEF_TW_W,
  parameter int TW_FRAC = fft_pkg::DEF_TW_FRAC,
  localparam int AW     = (L > 1) ? $clog2(L) : 1
) (
  input  logic [AW-1:0]         addr,
  output logic signed [TW_W-1:0] tw_re,
  output logic signed [TW_W-1:0] tw_im
);

  localparam int TAB_N = 2 ** AW;
  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t tab_t [TAB_N];

  localparam real PI = 3.14159265358979323846;

  function automatic tab_t make_tab(bit imag);
    tab_t t;
    real  ang;
    for (int k = 0; k < TAB_N; k++) begin
      ang  = 2.0 * PI * real'(k) / real'(2 * L);
      t[k] = tw_t'(round_int((imag ? -$sin(ang) : $cos(ang)) * (2.0 ** TW_FRAC)));
    end
    return t;
  endfunction

  localparam tab_t TAB_RE = make_tab(1'b0);
  localparam tab_t TAB_IM = make_tab(1'b1);

  assign tw_re = TAB_RE[addr];
  assign tw_im = TAB_IM[addr];

endmodule
