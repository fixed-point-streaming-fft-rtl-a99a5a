// tb_fft128_sdf: end-to-end test of the 128-point FFT/IFFT at its default
// parameters (4.7 data, 2.8 twiddles, 1/sqrt(2) scaling per stage).
//
// A sequence of frames is streamed in: constant-envelope QPSK frames (0 dB
// PAPR), uniform random frames, a single tone, an over-range frame that makes
// the stages saturate, forward and inverse frames mixed, some fed back to
// back and some with gaps in in_valid. Each output sample is compared bit for
// bit with a frame-level fixed-point model (in-place DIF on an array), and
// out_index, out_first and out_inverse are checked. Each output must appear
// exactly 7 cycles after the input that completes it (input 127 + j for
// output j). The error against a floating-point DFT/IDFT scaled by 1/sqrt(N)
// is accumulated and reported as an SNR, which must exceed 25 dB for the
// in-range frames. Every mechanism (gaps, inverse frames, mode switches, back
// to back frames, saturation) must occur at least once.
module tb_fft128_sdf;
  import fft_ref_pkg::*;

  localparam int N = 128, LOGN = 7, W = 11, FRAC = 7, LAT = 7;
  localparam int NFRAMES = 10;

  int checks = 0, failures = 0;
  int n_gap = 0, n_inv = 0, n_fwd = 0, n_switch = 0, n_b2b = 0, n_ovf = 0, n_model_sat = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_inverse = 0;
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic out_valid, out_first, out_inverse, overflow;
  logic signed [W-1:0] out_re, out_im;
  logic [LOGN-1:0] out_index;

  fft128_sdf dut (.clk, .rst_n, .in_valid, .in_inverse, .in_re, .in_im,
                  .out_valid, .out_re, .out_im, .out_index, .out_first, .out_inverse, .overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- stimulus and expected results ------------------------------
  cpx_t frames[NFRAMES + 1][];
  bit   inv_of[NFRAMES + 1];
  bit   in_range[NFRAMES + 1];
  cpx_t expect_fx[NFRAMES + 1][];   // model output, bit-reversed order, after output swap
  real  ref_re[NFRAMES + 1][], ref_im[NFRAMES + 1][];  // float reference, natural order

  function automatic void make_frames();
    real a = 0.70710678 * 128.0;
    for (int f = 0; f <= NFRAMES; f++) begin
      frames[f] = new[N];
      in_range[f] = 1;
      for (int n = 0; n < N; n++) begin
        case (f % 5)
          0: frames[f][n] = '{($urandom_range(0, 1) ? 91 : -91), ($urandom_range(0, 1) ? 91 : -91)};
          1: frames[f][n] = '{$signed($urandom_range(0, 256)) - 128, $signed($urandom_range(0, 256)) - 128};
          2: frames[f][n] = '{longint'(a * $cos(2.0 * 3.14159265358979 * 5 * n / N)) + 0,
                              longint'(a * $sin(2.0 * 3.14159265358979 * 5 * n / N)) + 0};
          3: frames[f][n] = '{($urandom_range(0, 1) ? 91 : -91), ($urandom_range(0, 1) ? 91 : -91)};
          default: frames[f][n] = '{$signed($urandom_range(0, 2046)) - 1023, $signed($urandom_range(0, 2046)) - 1023};
        endcase
      end
      if (f % 5 == 4) in_range[f] = 0;
      if (f == NFRAMES) foreach (frames[f][n]) frames[f][n] = '{0, 0};  // flush frame
      inv_of[f] = (f == NFRAMES) ? 0 : (f % 3 == 1);
    end
  endfunction

  function automatic void make_expect(int f);
    cpx_t x[];
    int   sc = 0;
    real  sgn, ang, sr, si;
    x = new[N];
    for (int n = 0; n < N; n++)
      x[n] = inv_of[f] ? '{frames[f][n].im, frames[f][n].re} : frames[f][n];
    fft_frame(x, '{7{4}}, '{7{7}}, 8, 1'b1, sc);
    n_model_sat += sc;
    expect_fx[f] = new[N];
    for (int p = 0; p < N; p++)
      expect_fx[f][p] = inv_of[f] ? '{x[p].im, x[p].re} : x[p];
    // floating point: forward e^{-j..}, inverse e^{+j..}, both / sqrt(N)
    ref_re[f] = new[N];
    ref_im[f] = new[N];
    sgn = inv_of[f] ? 1.0 : -1.0;
    for (int k = 0; k < N; k++) begin
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        ang = sgn * 2.0 * 3.14159265358979323846 * ((n * k) % N) / N;
        sr += frames[f][n].re * $cos(ang) - frames[f][n].im * $sin(ang);
        si += frames[f][n].re * $sin(ang) + frames[f][n].im * $cos(ang);
      end
      ref_re[f][k] = sr / $sqrt(N);
      ref_im[f][k] = si / $sqrt(N);
    end
  endfunction

  // ---------------- cycle bookkeeping -----------------------------------------
  int cyc = 0;
  int acc_cycle[$];
  always @(posedge clk) begin
    if (rst_n && in_valid) acc_cycle.push_back(cyc);
    cyc <= cyc + 1;
    if (rst_n && overflow) n_ovf++;
  end

  // ---------------- output checker -----------------------------------------------
  int  out_j = 0;
  real sig_p = 0.0, err_p = 0.0, sig_q = 0.0, err_q = 0.0;
  always @(negedge clk) if (rst_n && out_valid) begin
    int f, p, k;
    f = out_j / N;
    p = out_j % N;
    k = bitrev(p, LOGN);
    if (f < NFRAMES) begin
      check($sformatf("frame %0d pos %0d re", f, p), out_re, expect_fx[f][p].re);
      check($sformatf("frame %0d pos %0d im", f, p), out_im, expect_fx[f][p].im);
      check("out_index", out_index, k);
      check("out_first", out_first, p == 0);
      check("out_inverse", out_inverse, inv_of[f]);
      if (acc_cycle.size() > out_j + N - 1)
        check($sformatf("latency of output %0d", out_j), cyc, acc_cycle[out_j + N - 1] + LAT);
      else check("output before its input", 0, 1);
      if (in_range[f]) begin
        sig_p += ref_re[f][k] ** 2 + ref_im[f][k] ** 2;
        err_p += (out_re - ref_re[f][k]) ** 2 + (out_im - ref_im[f][k]) ** 2;
      end
      if (f % 5 == 0 || f % 5 == 3) begin
        sig_q += ref_re[f][k] ** 2 + ref_im[f][k] ** 2;
        err_q += (out_re - ref_re[f][k]) ** 2 + (out_im - ref_im[f][k]) ** 2;
      end
    end
    out_j++;
  end

  // ---------------- driver --------------------------------------------------------
  initial begin
    real snr;
    make_frames();
    for (int f = 0; f < NFRAMES; f++) make_expect(f);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f <= NFRAMES; f++) begin
      automatic bit gappy = (f % 4 == 2);
      if (f > 0 && inv_of[f] != inv_of[f-1]) n_switch++;
      if (inv_of[f]) n_inv++; else n_fwd++;
      // frames 3 and 7 are preceded by an idle pause; the rest follow back to back
      if (f == 3 || f == 7) begin
        @(negedge clk); in_valid = 0; repeat (9) @(negedge clk);
      end else if (f > 0) n_b2b++;
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        while (gappy && $urandom_range(0, 3) == 0) begin
          in_valid = 0; in_inverse = $urandom_range(0, 1); n_gap++;
          @(negedge clk);
        end
        in_valid   = 1;
        in_inverse = (n == 0) ? inv_of[f] : $urandom_range(0, 1);  // only sampled on sample 0
        in_re      = W'(frames[f][n].re);
        in_im      = W'(frames[f][n].im);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(negedge clk);
    check("all checked frames came out", out_j >= NFRAMES * N, 1);
    snr = 10.0 * $log10(sig_p / err_p);
    $display("SNR against floating point (in-range frames): %0.1f dB", snr);
    check("SNR above 25 dB", snr > 25.0, 1);
    $display("SNR for constant-envelope QPSK frames (0 dB PAPR): %0.1f dB", 10.0 * $log10(sig_q / err_q));
    $display("gap cycles %0d, inverse frames %0d, forward frames %0d, mode switches %0d, back-to-back frames %0d, overflow cycles %0d (model saturations %0d)",
             n_gap, n_inv, n_fwd, n_switch, n_b2b, n_ovf, n_model_sat);
    check("gaps occurred", n_gap > 0, 1);
    check("inverse frames occurred", n_inv > 0, 1);
    check("forward frames occurred", n_fwd > 0, 1);
    check("mode switches occurred", n_switch > 0, 1);
    check("back-to-back frames occurred", n_b2b > 0, 1);
    check("saturation occurred", (n_ovf > 0) && (n_model_sat > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
