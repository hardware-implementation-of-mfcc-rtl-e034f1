// mfcc_ref_pkg: reference model of the MFCC datapath for the testbenches.
//
// Written independently of the RTL: tables come from their formulas, the FFT
// is a textbook iterative radix-2 transform on 64-bit integers with the same
// number formats (Q1.6 twiddles rounded with +32 >>> 6), and the logarithm
// is computed by a bit loop. Every function mirrors one documented block
// format so that the testbenches can compare bit for bit.
package mfcc_ref_pkg;
  localparam real PI_R = 3.14159265358979323846;

  function automatic int rnd(real x);
    return $rtoi($floor(x + 0.5));
  endfunction

  function automatic int ref_ham(int l, int n);
    return rnd(16.0 * (0.54 - 0.46 * $cos(2.0 * PI_R * l / (n - 1))));
  endfunction

  function automatic int ref_tw_re(int k, int n);
    return rnd(64.0 * $cos(2.0 * PI_R * k / n));
  endfunction

  function automatic int ref_tw_im(int k, int n);
    return -rnd(64.0 * $sin(2.0 * PI_R * k / n));
  endfunction

  function automatic int ref_dct(int p0, int k0, int nf);
    int c = rnd(128.0 * $cos(PI_R * (p0 + 1) * (k0 + 0.5) / nf));
    return c > 127 ? 127 : c;
  endfunction

  // mel edge j in FFT bins, fs = 8 kHz
  function automatic real ref_edge(int j, int nf, int nfft);
    real top, m;
    top = 2595.0 * $log10(1.0 + 4000.0 / 700.0);
    m   = top * j / (nf + 1);
    return 700.0 * ($pow(10.0, m / 2595.0) - 1.0) / 8000.0 * nfft;
  endfunction

  // rising-side filter index (1..nf+1) and weight (0..128) of bin l
  function automatic void ref_mel(int l, int nf, int nfft, output int up_filter, output int w);
    int j = nf;
    for (int e = nf; e >= 0; e--)
      if (ref_edge(e, nf, nfft) > l) j = e - 1;
    up_filter = j + 1;
    w = rnd(128.0 * (l - ref_edge(j, nf, nfft)) / (ref_edge(j + 1, nf, nfft) - ref_edge(j, nf, nfft)));
  endfunction

  function automatic longint ref_log2(longint x);
    int k = 0;
    for (int i = 0; i < 63; i++) if (x >= (64'sd1 <<< i)) k = i;
    if (x == 0) return 0;
    return (longint'(k) <<< 10) | (((x <<< 10) >>> k) & 1023);
  endfunction

  // in-place fixed-point FFT, natural order in and out
  function automatic void ref_fft(int n, ref longint re[], ref longint im[]);
    int lg = $clog2(n);
    for (int i = 0; i < n; i++) begin
      int r = 0;
      for (int b = 0; b < lg; b++) if (i & (1 << b)) r |= 1 << (lg - 1 - b);
      if (r > i) begin
        longint t;
        t = re[i]; re[i] = re[r]; re[r] = t;
        t = im[i]; im[i] = im[r]; im[r] = t;
      end
    end
    for (int half = 1; half < n; half *= 2)
      for (int g = 0; g < n; g += 2 * half)
        for (int j = 0; j < half; j++) begin
          longint wr, wi, tr, ti, ar, ai;
          wr = ref_tw_re(j * (n / (2 * half)), n);
          wi = ref_tw_im(j * (n / (2 * half)), n);
          tr = (re[g+j+half] * wr - im[g+j+half] * wi + 32) >>> 6;
          ti = (re[g+j+half] * wi + im[g+j+half] * wr + 32) >>> 6;
          ar = re[g+j]; ai = im[g+j];
          re[g+j] = ar + tr;       im[g+j] = ai + ti;
          re[g+j+half] = ar - tr;  im[g+j+half] = ai - ti;
        end
  endfunction

  function automatic longint ref_amp(longint re, longint im);
    longint a = re < 0 ? -re : re;
    longint b = im < 0 ? -im : im;
    return a > b ? a + (b >>> 2) : b + (a >>> 2);
  endfunction

  // Expected MFCC RAM contents after a run over ns sub-frames of x:
  // 26 words per frame, frame n made of sub-frames n and n+1.
  function automatic void ref_mfcc(int ns, int nf, const ref int x[], ref int mem[]);
    longint sf_prev [], sf [], spp [];
    longint e_prev, e_cur;
    int     prev_s, nfr, up, w;
    int     stat [][];
    nfr = ns - 1;
    mem = new[nfr * 26];
    stat = new[nfr];
    sf_prev = new[nf + 2];
    sf = new[nf + 2];
    spp = new[nf];
    prev_s = 0;
    e_prev = 0;
    for (int s = 0; s < ns; s++) begin
      longint re[] = new[128];
      longint im[] = new[128];
      e_cur = 0;
      for (int l = 0; l < 128; l++) begin
        re[l] = 0; im[l] = 0;
        if (l < 80) begin
          int v = x[s * 80 + l];
          longint pe = longint'($floor(real'(v) - 0.96875 * real'(prev_s)));
          prev_s = v;
          re[l] = pe * ref_ham(l, 80);
          e_cur += longint'(v) * v;
        end
      end
      ref_fft(128, re, im);
      for (int k = 0; k < nf + 2; k++) sf[k] = 0;
      for (int l = 0; l < 65; l++) begin
        longint a = ref_amp(re[l], im[l]);
        ref_mel(l, nf, 128, up, w);
        sf[up]     += (a * w) >>> 7;
        sf[up - 1] += (a * (128 - w)) >>> 7;
      end
      if (s > 0) begin
        int f = s - 1;
        stat[f] = new[13];
        for (int k = 0; k < nf; k++) spp[k] = ref_log2(sf[k + 1] + sf_prev[k + 1]);
        for (int p = 0; p < 12; p++) begin
          longint acc = 0;
          for (int k = 0; k < nf; k++) acc += spp[k] * ref_dct(p, k, nf);
          stat[f][p] = int'(acc >>> 13);
        end
        stat[f][12] = int'(ref_log2(e_cur + e_prev) >>> 1);
      end
      sf_prev = sf;
      e_prev = e_cur;
    end
    for (int f = 0; f < nfr; f++)
      for (int i = 0; i < 13; i++) begin
        int fm2 = f - 2 < 0 ? 0 : f - 2;
        int fm1 = f - 1 < 0 ? 0 : f - 1;
        int fp1 = f + 1 > nfr - 1 ? nfr - 1 : f + 1;
        int fp2 = f + 2 > nfr - 1 ? nfr - 1 : f + 2;
        int d = 2 * (stat[fp2][i] - stat[fm2][i]) + (stat[fp1][i] - stat[fm1][i]);
        d = d > 32767 ? 32767 : d < -32768 ? -32768 : d;
        mem[f * 26 + i] = stat[f][i];
        mem[f * 26 + 13 + i] = d;
      end
  endfunction
endpackage
