// fft_pkg: constants, types and fixed-point helpers shared by the streaming
// radix-2 SDF FFT.
//
// Number format: every datapath word is a two's-complement fixed-point number.
// A word of W bits with F fraction bits has W-F integer bits (sign included).
// The stage data word defaults to 11 bits as 4.7 (4 integer, 7 fraction bits),
// the precision found sufficient for every stage under 1/sqrt(N) scaling.
// Twiddle and scale factors use 10 bits as 2.8: two integer bits are the least
// that hold the range [-1, 1]; the 8 fraction bits are this design's choice.
//
// Rounding: products are truncated (low bits dropped, i.e. rounded towards
// minus infinity), as the precision description of the butterfly says.
// Overflow: a value that does not fit the narrower word saturates to its
// largest or smallest value; saturation is this design's choice.
package fft_pkg;

  // Main configuration: 128 points, 7 stages.
  localparam int DEF_N     = 128;
  localparam int DEF_DATA_W    = 11;   // stage precision P (4.7)
  localparam int DEF_DATA_FRAC = 7;
  localparam int DEF_TW_W      = 10;   // twiddle precision TP = scale precision SP (2.8)
  localparam int DEF_TW_FRAC   = 8;

  // Per-stage scaling applied by the M2 multipliers.
  //   SCALE_HALF      : x 1/2 per stage, 1/N overall
  //   SCALE_INV_SQRT2 : x 1/sqrt(2) per stage, 1/sqrt(N) overall (default)
  typedef enum logic [0:0] {
    SCALE_HALF      = 1'b0,
    SCALE_INV_SQRT2 = 1'b1
  } scale_e;

  // Scale factor as a TW_W-bit, TW_FRAC-fraction constant.
  function automatic int scale_const(scale_e s, int frac);
    real v;
    v = (s == SCALE_HALF) ? 0.5 : 0.70710678118654752;
    return $rtoi(v * (2.0 ** frac) + 0.5);
  endfunction

  // Round a real to the nearest integer, halves away from zero.
  function automatic int round_int(real v);
    return (v < 0.0) ? -$rtoi(-v + 0.5) : $rtoi(v + 0.5);
  endfunction

endpackage
