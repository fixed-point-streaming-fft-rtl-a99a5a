// fft_ref_pkg: reference arithmetic for the FFT testbenches.
//
// Models the butterfly word lengths with plain 64-bit integers: the sum and
// difference are exact, a product is divided by 2^frac with floor rounding,
// and a value outside the target word is clamped. The twiddle factors are
// computed from $cos/$sin with halves rounded away from zero. A frame-level
// model runs the radix-2 decimation-in-frequency FFT in place on an array,
// stage by stage, with the same arithmetic and per-stage word lengths,
// leaving bin k at position bitreverse(k), which is the order the streaming
// hardware emits.
package fft_ref_pkg;

  typedef struct {
    longint re;
    longint im;
  } cpx_t;

  function automatic longint floor_shift(longint v, int sh);
    return v >>> sh;   // arithmetic shift = floor division by 2^sh
  endfunction

  function automatic longint clamp(longint v, int w, ref int sat_cnt);
    longint hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) begin sat_cnt++; return hi; end
    if (v < lo) begin sat_cnt++; return lo; end
    return v;
  endfunction

  function automatic longint rnd(real v);
    return (v < 0.0) ? -longint'($rtoi(-v + 0.5)) : longint'($rtoi(v + 0.5));
  endfunction

  // W_{2L}^k in TW_FRAC fraction bits
  function automatic cpx_t twiddle(int k, int l, int tw_frac);
    cpx_t  t;
    real   ang;
    ang  = 2.0 * 3.14159265358979323846 * k / (2.0 * l);
    t.re = rnd($cos(ang) * (2.0 ** tw_frac));
    t.im = rnd(-$sin(ang) * (2.0 ** tw_frac));
    return t;
  endfunction

  function automatic longint scale_q(bit inv_sqrt2, int tw_frac);
    return rnd((inv_sqrt2 ? 0.70710678118654752 : 0.5) * (2.0 ** tw_frac));
  endfunction

  // One butterfly; w = data word, a/b inputs, tw twiddle, sq scale constant.
  function automatic void butterfly(input cpx_t a, input cpx_t b, input cpx_t tw,
                                    input longint sq, input int w, input int tw_frac,
                                    output cpx_t sum, output cpx_t dif,
                                    ref int sat_cnt);
    longint sr, si, dr, di, mr, mi;
    sr = a.re + b.re;
    si = a.im + b.im;
    dr = a.re - b.re;
    di = a.im - b.im;
    mr = clamp(floor_shift(dr * tw.re - di * tw.im, tw_frac), w + 1, sat_cnt);
    mi = clamp(floor_shift(dr * tw.im + di * tw.re, tw_frac), w + 1, sat_cnt);
    sum.re = clamp(floor_shift(sr * sq, tw_frac), w, sat_cnt);
    sum.im = clamp(floor_shift(si * sq, tw_frac), w, sat_cnt);
    dif.re = clamp(floor_shift(mr * sq, tw_frac), w, sat_cnt);
    dif.im = clamp(floor_shift(mi * sq, tw_frac), w, sat_cnt);
  endfunction

  // Re-express a word with from_frac fraction bits in to_w bits with to_frac
  // fraction bits: zeros appended or low bits dropped (floor), then clamped.
  function automatic longint align(longint v, int from_frac, int to_w, int to_frac,
                                   ref int sat_cnt);
    longint t;
    t = (to_frac >= from_frac) ? v * (64'sd1 <<< (to_frac - from_frac))
                               : floor_shift(v, from_frac - to_frac);
    return clamp(t, to_w, sat_cnt);
  endfunction

  // Whole-frame fixed-point DIF FFT, in place, output in bit-reversed order.
  // Stage s works in st_int[s] integer and st_frac[s] fraction bits; the
  // input is taken to be in the first stage's format.
  function automatic void fft_frame(ref cpx_t x[], input int st_int[], input int st_frac[],
                                    input int tw_frac, input bit inv_sqrt2, ref int sat_cnt);
    int   n, l, st, w, pf;
    cpx_t s, d;
    n  = x.size();
    l  = n / 2;
    st = 0;
    pf = st_frac[0];
    while (l >= 1) begin
      w = st_int[st] + st_frac[st];
      foreach (x[i]) begin
        x[i].re = align(x[i].re, pf, w, st_frac[st], sat_cnt);
        x[i].im = align(x[i].im, pf, w, st_frac[st], sat_cnt);
      end
      for (int base = 0; base < n; base += 2 * l)
        for (int k = 0; k < l; k++) begin
          butterfly(x[base + k], x[base + k + l], twiddle(k, l, tw_frac),
                    scale_q(inv_sqrt2, tw_frac), w, tw_frac, s, d, sat_cnt);
          x[base + k]     = s;
          x[base + k + l] = d;
        end
      pf = st_frac[st];
      st++;
      l = l / 2;
    end
  endfunction

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (v[i]) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

endpackage
