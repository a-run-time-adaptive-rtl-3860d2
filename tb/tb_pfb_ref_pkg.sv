// tb_pfb_ref_pkg: reference arithmetic of the polyphase filter banks for the
// testbenches.
//
// A frame of an NBINS-bin bank with TAPS taps per branch, taken over the last
// L = NBINS*TAPS samples of a stream (hist[0] newest), is
//   y[k] = sum_n h[n] * x[n] * exp(-j*2*pi*k*n/NBINS)
// computed here directly over all L samples (no polyphase folding). Two
// versions: in real numbers, for a check within a tolerance, and in the
// integer steps of the number format (sum h*x, floor >> 15 per branch, then
// the Q14 twiddles, floor >> 14, saturate to 16 bits), for bit-exact checks of
// chained stages.
package tb_pfb_ref_pkg;
  import demux_pkg::*;

  typedef struct {
    int re;
    int im;
  } ci_t;

  function automatic void frame_real(input ci_t hist[$], input int nb, input int ntap,
                                     input int k, output real yr, output real yi);
    yr = 0.0;
    yi = 0.0;
    for (int n = 0; n < nb * ntap; n++) begin
      real h, a, xr, xi;
      h  = proto_coef(nb, ntap, n) / 32768.0;
      a  = 2.0 * PI * k * n / nb;
      xr = (n < hist.size()) ? real'(hist[n].re) : 0.0;
      xi = (n < hist.size()) ? real'(hist[n].im) : 0.0;
      yr += h * (xr * $cos(a) + xi * $sin(a));
      yi += h * (xi * $cos(a) - xr * $sin(a));
    end
  endfunction

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic ci_t frame_int(input ci_t hist[$], input int nb, input int ntap, input int k);
    longint ur [], ui [];
    longint yr, yi;
    ci_t    r;
    ur = new[nb];
    ui = new[nb];
    for (int m = 0; m < nb; m++) begin
      longint ar, ai;
      ar = 0;
      ai = 0;
      for (int t = 0; t < ntap; t++) begin
        int n;
        n = m + nb * t;
        if (n < hist.size()) begin
          ar += longint'(proto_coef(nb, ntap, n)) * hist[n].re;
          ai += longint'(proto_coef(nb, ntap, n)) * hist[n].im;
        end
      end
      ur[m] = ar >>> 15;
      ui[m] = ai >>> 15;
    end
    yr = 0;
    yi = 0;
    for (int m = 0; m < nb; m++) begin
      longint c, s;
      c = tw_cos(nb, (k * m) % nb);
      s = tw_sin(nb, (k * m) % nb);
      yr += ur[m] * c + ui[m] * s;
      yi += ui[m] * c - ur[m] * s;
    end
    r.re = int'(sat16(yr >>> 14));
    r.im = int'(sat16(yi >>> 14));
    return r;
  endfunction

endpackage
