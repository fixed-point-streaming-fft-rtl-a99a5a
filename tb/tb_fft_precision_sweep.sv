// tb_fft_precision_sweep: runs the two word-length configurations of the
// 128-point FFT over a range of input peak-to-average power ratios.
//
//   A: 1/sqrt(2) scaling per stage (1/sqrt(N) overall), 4.7 in every stage
//      (the default configuration)
//   B: 1/2 scaling per stage (1/N overall) with the per-stage precisions
//      2.8, 3.8, 3.8, 3.9, 3.11, 3.12, 3.12
//
// Each test frame has peak magnitude 1.0: one sample sits at the peak and the
// others are QPSK points of a smaller, equal magnitude chosen to give the
// frame's PAPR (0 dB means every sample at magnitude 1). Both instances get
// the same frames. Every output is checked bit for bit against the
// fixed-point model, and the SNR against a floating-point DFT (divided by
// sqrt(N) for A and by N for B) is printed for each PAPR.
module tb_fft_precision_sweep;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int N = 128, LOGN = 7;
  localparam int NP = 6;
  localparam real PAPR_DB[NP] = '{0.0, 3.0, 6.0, 9.0, 12.0, 14.0};
  localparam int FR_PER = 2;                 // frames per PAPR value
  localparam int NF = NP * FR_PER;           // checked frames (a flush frame follows)

  localparam int A_INT[7]  = '{4, 4, 4, 4, 4, 4, 4};
  localparam int A_FRAC[7] = '{7, 7, 7, 7, 7, 7, 7};
  localparam int B_INT[7]  = '{2, 3, 3, 3, 3, 3, 3};
  localparam int B_FRAC[7] = '{8, 8, 8, 9, 11, 12, 12};

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [10:0] a_in_re = '0, a_in_im = '0, a_re, a_im;
  logic signed [9:0]  b_in_re = '0, b_in_im = '0;
  logic signed [14:0] b_re, b_im;
  logic a_valid, b_valid;
  logic [LOGN-1:0] a_idx, b_idx;
  logic a_first, a_inv, a_ovf, b_first, b_inv, b_ovf;

  fft128_sdf dut_a (.clk, .rst_n, .in_valid, .in_inverse(1'b0), .in_re(a_in_re), .in_im(a_in_im),
                    .out_valid(a_valid), .out_re(a_re), .out_im(a_im), .out_index(a_idx),
                    .out_first(a_first), .out_inverse(a_inv), .overflow(a_ovf));

  fft128_sdf #(.STAGE_INT(B_INT), .STAGE_FRAC(B_FRAC), .SCALE(SCALE_HALF)) dut_b (
                    .clk, .rst_n, .in_valid, .in_inverse(1'b0), .in_re(b_in_re), .in_im(b_in_im),
                    .out_valid(b_valid), .out_re(b_re), .out_im(b_im), .out_index(b_idx),
                    .out_first(b_first), .out_inverse(b_inv), .overflow(b_ovf));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real  xr[NF + 1][N], xi[NF + 1][N];      // frames as real numbers
  cpx_t a_out[$], b_out[$];

  always @(negedge clk) if (rst_n) begin
    if (a_valid) a_out.push_back('{a_re, a_im});
    if (b_valid) b_out.push_back('{b_re, b_im});
  end

  function automatic void make_frame(int f, real papr_db);
    real pk = 0.999, p_avg, m;
    int  peak_at;
    // mean power pk^2 / papr = (pk^2 + (N-1) m^2) / N
    p_avg   = pk * pk / (10.0 ** (papr_db / 10.0));
    m       = $sqrt((N * p_avg - pk * pk) / (N - 1));
    peak_at = $urandom_range(0, N - 1);
    for (int n = 0; n < N; n++) begin
      real mag = (n == peak_at) ? pk : m;
      xr[f][n] = ($urandom_range(0, 1) ? 1.0 : -1.0) * mag * 0.70710678;
      xi[f][n] = ($urandom_range(0, 1) ? 1.0 : -1.0) * mag * 0.70710678;
    end
  endfunction

  function automatic real snr_db(cpx_t got[], int frac, real norm, int f);
    real sig = 0.0, err = 0.0, sr, si, ang;
    for (int p = 0; p < N; p++) begin
      int k = bitrev(p, LOGN);
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        ang = -2.0 * 3.14159265358979323846 * ((n * k) % N) / N;
        sr += xr[f][n] * $cos(ang) - xi[f][n] * $sin(ang);
        si += xr[f][n] * $sin(ang) + xi[f][n] * $cos(ang);
      end
      sr /= norm; si /= norm;
      sig += sr * sr + si * si;
      err += (got[p].re / (2.0 ** frac) - sr) ** 2 + (got[p].im / (2.0 ** frac) - si) ** 2;
    end
    return 10.0 * $log10(sig / err);
  endfunction

  initial begin
    cpx_t xa[], xb[], ga[], gb[];
    int   sc;
    real  snr_a[NP], snr_b[NP];
    for (int f = 0; f <= NF; f++) make_frame(f, (f < NF) ? PAPR_DB[f / FR_PER] : 0.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f <= NF; f++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        in_valid = 1;
        a_in_re = 11'(rnd(xr[f][n] * 128.0)); a_in_im = 11'(rnd(xi[f][n] * 128.0));
        b_in_re = 10'(rnd(xr[f][n] * 256.0)); b_in_im = 10'(rnd(xi[f][n] * 256.0));
      end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks += 2;
    if (a_out.size() < NF * N) begin failures++; $display("FAIL A produced %0d", a_out.size()); end
    if (b_out.size() < NF * N) begin failures++; $display("FAIL B produced %0d", b_out.size()); end
    foreach (snr_a[i]) begin snr_a[i] = 0.0; snr_b[i] = 0.0; end
    for (int f = 0; f < NF && a_out.size() >= NF * N && b_out.size() >= NF * N; f++) begin
      xa = new[N]; xb = new[N]; ga = new[N]; gb = new[N];
      for (int n = 0; n < N; n++) begin
        xa[n] = '{rnd(xr[f][n] * 128.0), rnd(xi[f][n] * 128.0)};
        xb[n] = '{rnd(xr[f][n] * 256.0), rnd(xi[f][n] * 256.0)};
        ga[n] = a_out[f * N + n];
        gb[n] = b_out[f * N + n];
      end
      sc = 0; fft_frame(xa, A_INT, A_FRAC, 8, 1'b1, sc);
      sc = 0; fft_frame(xb, B_INT, B_FRAC, 8, 1'b0, sc);
      for (int p = 0; p < N; p++) begin
        checks += 2;
        if (ga[p] != xa[p]) begin failures++; $display("FAIL A frame %0d pos %0d", f, p); end
        if (gb[p] != xb[p]) begin failures++; $display("FAIL B frame %0d pos %0d", f, p); end
      end
      snr_a[f / FR_PER] += snr_db(ga, 7, $sqrt(N), f) / FR_PER;
      snr_b[f / FR_PER] += snr_db(gb, 12, N, f) / FR_PER;
    end
    $display("input PAPR (dB) | SNR A: 1/sqrt(N), 4.7 (dB) | SNR B: 1/N, 2.8..3.12 (dB)");
    for (int i = 0; i < NP; i++)
      $display("%15.1f | %26.1f | %28.1f", PAPR_DB[i], snr_a[i], snr_b[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
