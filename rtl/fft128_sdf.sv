// fft128_sdf: 128-point streaming fixed-point FFT/IFFT built as a cascade of
// radix-2 single-path delay-feedback (SDF) decimation-in-frequency stages.
//
// Samples arrive one per cycle (when in_valid is high) in natural order and
// leave one per cycle in bit-reversed order; out_index gives the bin of each
// output sample. log2(N) stages are chained; stage s (s = 1 .. log2 N) holds a
// feedback buffer of N/2^s samples, 127 complex words in all for N = 128.
// Every stage multiplies its results by the same constant (SCALE): 1/sqrt(2)
// per stage gives an overall 1/sqrt(N), so the output has the same RMS as the
// input and every stage can use the same word, 4.7 by default. SCALE_HALF
// gives 1/N overall instead.
//
// Word lengths are set per stage: stage s works in STAGE_INT[s].STAGE_FRAC[s]
// (integer bits including the sign, fraction bits). The input port uses the
// first stage's format, the output port the last stage's; each stage aligns
// the previous stage's words to its own format. The 1/N experiment's
// precisions, for example, are STAGE_INT = '{2,3,3,3,3,3,3} and
// STAGE_FRAC = '{8,8,8,9,11,12,12} with SCALE = SCALE_HALF.
//
// Inverse transform: the same hardware computes the IFFT by swapping real and
// imaginary parts at the input and again at the output:
//   swap(FFT(swap(x))) = conj(FFT(conj(x))) = N * IDFT(x),
// scaled here by the stage factors (1/sqrt(N) overall by default, so the
// result is sqrt(N) * IDFT(x); with SCALE_HALF it is exactly IDFT(x)).
// in_inverse is sampled on the first sample of each input frame; a small
// queue carries that choice to the output so the second swap is applied to
// the same frame, and out_inverse reports it.
//
// Timing: the pipeline advances only on cycles with a valid input sample.
// Output sample k of frame f appears once frame f+1 has been fed far enough;
// in samples, the pipeline delay is N-1 (the sum of the buffer lengths) plus
// one register per stage in cycles. To flush the last frame, feed one more
// frame (for instance zeros). out_first marks the first sample of each output
// frame. overflow pulses when any stage saturated a result.
//
// The stage structure, buffer sizes, scaling and the swap-based IFFT follow
// the document; the valid handshake, the frame-mode queue, the bin index
// output and saturation are this design's choices.
module fft128_sdf
  import fft_pkg::*;
#(
  parameter int     N          = fft_pkg::DEF_N,
  localparam int    STAGES     = $clog2(N),
  parameter int     STAGE_INT  [STAGES] = '{default: fft_pkg::DEF_DATA_W - fft_pkg::DEF_DATA_FRAC},
  parameter int     STAGE_FRAC [STAGES] = '{default: fft_pkg::DEF_DATA_FRAC},
  parameter int     TW_W       = fft_pkg::DEF_TW_W,
  parameter int     TW_FRAC    = fft_pkg::DEF_TW_FRAC,
  parameter scale_e SCALE      = SCALE_INV_SQRT2,
  localparam int    IN_W       = STAGE_INT[0] + STAGE_FRAC[0],
  localparam int    OUT_W      = STAGE_INT[STAGES-1] + STAGE_FRAC[STAGES-1]
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_inverse,
  input  logic signed [IN_W-1:0]   in_re,
  input  logic signed [IN_W-1:0]   in_im,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_re,
  output logic signed [OUT_W-1:0]  out_im,
  output logic [STAGES-1:0]        out_index,
  output logic                     out_first,
  output logic                     out_inverse,
  output logic                     overflow
);

  function automatic int max_width();
    int m = 1;
    for (int s = 0; s < STAGES; s++)
      if (STAGE_INT[s] + STAGE_FRAC[s] > m) m = STAGE_INT[s] + STAGE_FRAC[s];
    return m;
  endfunction
  localparam int MAXW = max_width();

  for (genvar s = 0; s < STAGES; s++) begin : g_chk
    if (STAGE_INT[s] < 1) begin : g_bad_int
      $error("every stage needs at least the sign as integer bit");
    end
  end
  if ((1 << STAGES) != N) begin : g_bad_n
    $error("N must be a power of two");
  end

  // ---------------- input side: frame counter and real/imaginary swap ----------
  logic [STAGES-1:0] in_cnt;
  logic              inv_latched;
  logic              cur_inv;

  assign cur_inv = (in_cnt == '0) ? in_inverse : inv_latched;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_cnt      <= '0;
      inv_latched <= 1'b0;
    end else if (in_valid) begin
      in_cnt <= in_cnt + 1'b1;
      if (in_cnt == '0) inv_latched <= in_inverse;
    end
  end

  logic                     s_valid [STAGES+1];
  // inter-stage words, sign-extended to the widest stage word
  logic signed [MAXW-1:0]   s_re    [STAGES+1];
  logic signed [MAXW-1:0]   s_im    [STAGES+1];
  logic [STAGES-1:0]        s_sat;

  assign s_valid[0] = in_valid;
  assign s_re[0]    = MAXW'(cur_inv ? in_im : in_re);
  assign s_im[0]    = MAXW'(cur_inv ? in_re : in_im);

  // ---------------- the stage cascade ------------------------------------------
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int SW  = STAGE_INT[s] + STAGE_FRAC[s];
    localparam int PW  = (s == 0) ? SW : STAGE_INT[s-1] + STAGE_FRAC[s-1];
    localparam int PF  = (s == 0) ? STAGE_FRAC[s] : STAGE_FRAC[s-1];
    logic signed [SW-1:0] o_re, o_im;

    sdf_stage #(
      .L      (N >> (s + 1)),
      .W      (SW),
      .FRAC   (STAGE_FRAC[s]),
      .IN_W   (PW),
      .IN_FRAC(PF),
      .TW_W   (TW_W),
      .TW_FRAC(TW_FRAC),
      .SCALE  (SCALE)
    ) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (s_valid[s]),
      .in_re    (s_re[s][PW-1:0]),
      .in_im    (s_im[s][PW-1:0]),
      .out_valid(s_valid[s+1]),
      .out_re   (o_re),
      .out_im   (o_im),
      .sat      (s_sat[s])
    );

    assign s_re[s+1] = MAXW'(o_re);
    assign s_im[s+1] = MAXW'(o_im);
  end

  // ---------------- frame-mode queue -------------------------------------------
  // Frames in flight never exceed three (one being output, one being fed, the
  // next one just started), so four entries suffice.
  localparam int QD = 4;
  logic [QD-1:0] mode_q;
  logic [1:0]    q_wr, q_rd;
  logic [2:0]    q_cnt;
  logic          q_push, q_pop;

  logic [STAGES-1:0] out_cnt;

  assign q_push = in_valid && (in_cnt == '0);
  assign q_pop  = s_valid[STAGES] && (out_cnt == '1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_q  <= '0;
      q_wr    <= '0;
      q_rd    <= '0;
      q_cnt   <= '0;
      out_cnt <= '0;
    end else begin
      if (q_push) begin
        mode_q[q_wr] <= cur_inv;
        q_wr         <= q_wr + 1'b1;
      end
      if (q_pop) q_rd <= q_rd + 1'b1;
      q_cnt <= q_cnt + 3'(q_push) - 3'(q_pop);
      if (s_valid[STAGES]) out_cnt <= out_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(q_push && !q_pop && q_cnt == 3'(QD))) else $error("frame-mode queue overflow");
      assert (!(s_valid[STAGES] && q_cnt == '0))       else $error("output frame without a mode entry");
    end
  end

  // ---------------- output side --------------------------------------------------
  always_comb begin
    out_valid   = s_valid[STAGES];
    out_inverse = mode_q[q_rd];
    out_re      = OUT_W'(out_inverse ? s_im[STAGES] : s_re[STAGES]);
    out_im      = OUT_W'(out_inverse ? s_re[STAGES] : s_im[STAGES]);
    out_first   = s_valid[STAGES] && (out_cnt == '0);
    for (int b = 0; b < STAGES; b++) out_index[b] = out_cnt[STAGES-1-b];
    overflow    = |s_sat;
  end

endmodule
