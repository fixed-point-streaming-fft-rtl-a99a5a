// sdf_butterfly: radix-2 decimation-in-frequency butterfly with the fixed-point
// word lengths of the SDF stage.
//
// Given the earlier sample a and the later sample b of a pair (each P = W bits,
// F fraction bits) it computes
//   sum  = M2( a + b )                 -> upper output, forwarded to the next stage
//   diff = M2( M1( (a - b) * tw ) )    -> lower output, fed back into the buffer
// Word lengths follow the precision description of the butterfly:
//   adder/subtractor : P+1 bits, kept in full
//   M1 (twiddle)     : (P+1) x TP product, truncated back to P+1 bits
//   M2 (stage scale) : (P+1) x SP product, truncated back to P bits, SP = TP
// "Truncated" drops the low TW_FRAC product bits (rounding towards minus
// infinity). The twiddle has magnitude at most one, so M1 keeps the integer
// bits of its input; a complex product can still exceed the word by up to
// sqrt(2), and any result that does not fit saturates (this design's choice).
// sat is high when any of the six truncations saturated.
//
// The scale factor is a constant: 1/2 per stage (1/N overall) or 1/sqrt(2)
// per stage (1/sqrt(N) overall), rounded to TW_FRAC fraction bits.
// Purely combinational; the stage registers its output.
module sdf_butterfly
  import fft_pkg::*;
#(
  parameter int     W       = fft_pkg::DEF_DATA_W,
  parameter int     TW_W    = fft_pkg::DEF_TW_W,
  parameter int     TW_FRAC = fft_pkg::DEF_TW_FRAC,
  parameter scale_e SCALE   = SCALE_INV_SQRT2
) (
  input  logic signed [W-1:0]    a_re,
  input  logic signed [W-1:0]    a_im,
  input  logic signed [W-1:0]    b_re,
  input  logic signed [W-1:0]    b_im,
  input  logic signed [TW_W-1:0] tw_re,
  input  logic signed [TW_W-1:0] tw_im,
  output logic signed [W-1:0]    sum_re,
  output logic signed [W-1:0]    sum_im,
  output logic signed [W-1:0]    diff_re,
  output logic signed [W-1:0]    diff_im,
  output logic                   sat
);

  localparam int AW  = W + 1;             // adder precision P+1
  localparam int M1W = AW + TW_W + 1;     // complex product before truncation
  localparam int M2W = AW + TW_W;         // scale product before truncation
  localparam logic signed [TW_W-1:0] SCALE_Q = TW_W'(scale_const(SCALE, TW_FRAC));

  // Truncate the M1 result to AW bits, saturating on overflow.
  function automatic logic signed [AW:0] trunc_m1(logic signed [M1W-1:0] v);
    logic signed [M1W-1:0] s;
    logic                  ovf;
    s   = v >>> TW_FRAC;
    ovf = (s > M1W'((2 ** (AW - 1)) - 1)) || (s < -M1W'(2 ** (AW - 1)));
    // bit AW carries the saturation flag
    if (!ovf)          return {1'b0, s[AW-1:0]};
    else if (s[M1W-1]) return {1'b1, 1'b1, {(AW-1){1'b0}}};
    else               return {1'b1, 1'b0, {(AW-1){1'b1}}};
  endfunction

  // Multiply by the stage scale (M2) and truncate to W bits, saturating.
  function automatic logic signed [W:0] scale_m2(logic signed [AW-1:0] v);
    logic signed [M2W-1:0] p;
    logic signed [M2W-1:0] s;
    logic                  ovf;
    p   = M2W'(v) * M2W'(SCALE_Q);
    s   = p >>> TW_FRAC;
    ovf = (s > M2W'((2 ** (W - 1)) - 1)) || (s < -M2W'(2 ** (W - 1)));
    if (!ovf)          return {1'b0, s[W-1:0]};
    else if (s[M2W-1]) return {1'b1, 1'b1, {(W-1){1'b0}}};
    else               return {1'b1, 1'b0, {(W-1){1'b1}}};
  endfunction

  logic signed [AW-1:0]  add_re, add_im, sub_re, sub_im;
  logic signed [M1W-1:0] m1_re_full, m1_im_full;
  logic signed [AW:0]    m1_re, m1_im;
  logic signed [W:0]     s_re, s_im, d_re, d_im;

  always_comb begin
    add_re = AW'(a_re) + AW'(b_re);
    add_im = AW'(a_im) + AW'(b_im);
    sub_re = AW'(a_re) - AW'(b_re);
    sub_im = AW'(a_im) - AW'(b_im);

    // M1: complex multiply (sub_re + j sub_im) * (tw_re + j tw_im)
    m1_re_full = M1W'(sub_re) * M1W'(tw_re) - M1W'(sub_im) * M1W'(tw_im);
    m1_im_full = M1W'(sub_re) * M1W'(tw_im) + M1W'(sub_im) * M1W'(tw_re);
    m1_re      = trunc_m1(m1_re_full);
    m1_im      = trunc_m1(m1_im_full);

    // M2 on both outputs
    s_re = scale_m2(add_re);
    s_im = scale_m2(add_im);
    d_re = scale_m2(m1_re[AW-1:0]);
    d_im = scale_m2(m1_im[AW-1:0]);

    sum_re  = s_re[W-1:0];
    sum_im  = s_im[W-1:0];
    diff_re = d_re[W-1:0];
    diff_im = d_im[W-1:0];
    sat     = m1_re[AW] | m1_im[AW] | s_re[W] | s_im[W] | d_re[W] | d_im[W];
  end

endmodule
