// sdf_stage: one radix-2 single-path delay-feedback (SDF) stage of the
// decimation-in-frequency FFT.
//
// The stage sees a serial stream of complex samples and works on blocks of 2L
// samples, L being the length of its feedback buffer (N/2 in the first stage,
// N/4 in the second, ... 1 in the last). A counter of accepted samples splits
// each block into halves:
//   first half  (count < L):  the input switch sends the sample into the buffer;
//                             the output switch forwards the buffer's output,
//                             which is the twiddled difference left there by
//                             the previous block.
//   second half (count >= L): the buffer's output (sample k) and the input
//                             (sample k+L) enter the butterfly; the scaled sum
//                             is forwarded and the twiddled, scaled difference
//                             goes back into the buffer in place of sample k.
// So each block's L sums leave in order, followed by its L differences while
// the next block's first half is loading. The twiddle index is count - L.
//
// Interface and timing: the stage advances only on cycles with in_valid high,
// so gaps in the input simply pause it. The output is registered: out_valid
// follows an accepted input by one cycle. Outputs are marked valid from the
// first sum onwards (the first L inputs after reset produce no output), so a
// stage adds a delay of L samples plus one cycle. The last L differences of
// a stream leave only when L more samples are supplied.
//
// Precision: the stage computes and outputs in its own word, W bits with FRAC
// fraction bits. Words arriving in another format (IN_W bits, IN_FRAC
// fraction bits, from the previous stage) are first aligned to it: extra
// fraction bits are truncated, missing ones are appended as zeros, and a
// value beyond the stage's range saturates. With equal formats this is a
// plain wire.
//
// The switches, buffer, counter and the separate stage input, computation
// and output precisions follow the stage drawing; the valid handshake, the
// registered output, the input alignment rule and the reset are this
// design's choices.
module sdf_stage
  import fft_pkg::*;
#(
  parameter int     L       = 64,
  parameter int     W       = fft_pkg::DEF_DATA_W,
  parameter int     FRAC    = fft_pkg::DEF_DATA_FRAC,
  parameter int     IN_W    = W,
  parameter int     IN_FRAC = FRAC,
  parameter int     TW_W    = fft_pkg::DEF_TW_W,
  parameter int     TW_FRAC = fft_pkg::DEF_TW_FRAC,
  parameter scale_e SCALE   = SCALE_INV_SQRT2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                sat
);

  localparam int CW = $clog2(2 * L);          // block counter width
  localparam int AW = (L > 1) ? $clog2(L) : 1;

  logic [CW-1:0] cnt;            // accepted samples within the current block
  logic          second_half;    // comparator: count >= L
  logic          have_block;     // one whole block has passed: buffer holds results

  logic signed [W-1:0]    buf_re, buf_im;       // buffer output (cell L)
  logic signed [W-1:0]    fb_re, fb_im;         // buffer input
  logic signed [W-1:0]    sum_re, sum_im, dif_re, dif_im;
  logic signed [TW_W-1:0] tw_re, tw_im;
  logic                   bf_sat;
  logic [AW-1:0]          tw_addr;
  logic signed [W-1:0]    x_re, x_im;           // input aligned to the stage format
  logic                   x_sat;

  // ---------------- input alignment ------------------------------------------------
  localparam int SH  = (FRAC >= IN_FRAC) ? FRAC - IN_FRAC : IN_FRAC - FRAC;
  localparam int XW  = IN_W + SH + W;           // wide enough for any shift

  function automatic logic signed [W:0] align(logic signed [IN_W-1:0] v);
    logic signed [XW-1:0] t;
    t = XW'(v);
    t = (FRAC >= IN_FRAC) ? (t <<< SH) : (t >>> SH);
    if (t > XW'((2 ** (W - 1)) - 1))  return {1'b1, 1'b0, {(W-1){1'b1}}};
    if (t < -XW'(2 ** (W - 1)))       return {1'b1, 1'b1, {(W-1){1'b0}}};
    return {1'b0, t[W-1:0]};
  endfunction

  logic signed [W:0] al_re, al_im;
  assign al_re = align(in_re);
  assign al_im = align(in_im);
  assign x_re  = al_re[W-1:0];
  assign x_im  = al_im[W-1:0];
  assign x_sat = al_re[W] | al_im[W];

  assign second_half = (cnt >= CW'(L));
  assign tw_addr     = AW'(cnt - CW'(L));

  twiddle_rom #(.L(L), .TW_W(TW_W), .TW_FRAC(TW_FRAC)) u_rom (
    .addr (tw_addr),
    .tw_re(tw_re),
    .tw_im(tw_im)
  );

  sdf_butterfly #(.W(W), .TW_W(TW_W), .TW_FRAC(TW_FRAC), .SCALE(SCALE)) u_bf (
    .a_re   (buf_re),
    .a_im   (buf_im),
    .b_re   (x_re),
    .b_im   (x_im),
    .tw_re  (tw_re),
    .tw_im  (tw_im),
    .sum_re (sum_re),
    .sum_im (sum_im),
    .diff_re(dif_re),
    .diff_im(dif_im),
    .sat    (bf_sat)
  );

  // Input switch: load the sample in the first half, the difference in the second.
  assign fb_re = second_half ? dif_re : x_re;
  assign fb_im = second_half ? dif_im : x_im;

  sdf_buffer #(.L(L), .W(W)) u_buf (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(in_valid),
    .d_re    (fb_re),
    .d_im    (fb_im),
    .q_re    (buf_re),
    .q_im    (buf_im)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt        <= '0;
      have_block <= 1'b0;
      out_valid  <= 1'b0;
      out_re     <= '0;
      out_im     <= '0;
      sat        <= 1'b0;
    end else begin
      out_valid <= in_valid && (second_half || have_block);
      sat       <= in_valid && ((second_half && bf_sat) || x_sat);
      if (in_valid) begin
        cnt <= (cnt == CW'(2 * L - 1)) ? '0 : cnt + 1'b1;
        if (cnt == CW'(2 * L - 1)) have_block <= 1'b1;
        // Output switch: butterfly sum in the second half, buffer otherwise.
        out_re <= second_half ? sum_re : buf_re;
        out_im <= second_half ? sum_im : buf_im;
      end
    end
  end

endmodule
