// mfcc_pkg: widths, sizes and coefficient tables shared by the MFCC core.
//
// The bus widths are those of the core's block diagram: 16-bit speech, 17-bit
// pre-emphasis output, 5-bit window coefficients, 21-bit windowed samples,
// 8-bit FFT and DCT coefficients, 40-bit FFT outputs per part, 41-bit
// amplitudes, 45/46-bit mel filter sums, 39-bit energy and 16-bit log and
// cepstral values. The sub-frame of 80 samples and the 128-point FFT are the
// design's main configuration. The sample rate (8 kHz), the number of mel
// filters (20) and every coefficient format are this design's own choices.
//
// The coefficient tables are computed at elaboration time by the functions
// below, so no table file is needed:
//   hamming  ham(l)   = round(16 * (0.54 - 0.46 cos(2 pi l / (N-1))))   l = 0..N-1
//   twiddle  W^k      = round(64 cos(2 pi k / NFFT)) - j round(64 sin(2 pi k / NFFT))
//   dct      c(p,k)   = round(128 cos((k + 0.5) (p + 1) pi / K)), clipped to 127
//   mel      Mel(f)   = 2595 log10(1 + f / 700), K+2 edges equally spaced in mel
package mfcc_pkg;

  localparam int SAMPLE_W = 16;   // speech sample
  localparam int PRE_W    = 17;   // pre-emphasis output
  localparam int HAM_W    = 5;    // Hamming coefficient, unsigned, 16 = 1.0
  localparam int WIN_W    = 21;   // windowed sample
  localparam int TW_W     = 8;    // twiddle, signed Q1.6
  localparam int FFT_W    = 40;   // FFT real / imaginary part
  localparam int AMP_W    = 41;   // amplitude
  localparam int SF_W     = 45;   // mel filter output of one sub-frame
  localparam int SFSUM_W  = 46;   // overlapped filter output S'
  localparam int EN_W     = 39;   // frame energy
  localparam int LOG_W    = 16;   // log2 value, unsigned Q6.10
  localparam int LOG_FRAC = 10;
  localparam int COS_W    = 8;    // DCT coefficient, signed Q0.7
  localparam int CEP_W    = 16;   // cepstral / delta coefficient, signed
  localparam int MEL_W    = 8;    // mel weight, unsigned, 128 = 1.0
  localparam int MEL_ONE  = 128;

  localparam int SUBFRAME    = 80;   // samples per sub-frame
  localparam int NFFT        = 128;  // FFT points
  localparam int NBINS       = NFFT / 2 + 1;
  localparam int NFILT       = 20;   // mel filters
  localparam int NCEP        = 12;   // cepstral coefficients
  localparam int NCOEF       = NCEP + 1;      // plus log energy
  localparam int FRAME_WORDS = 2 * NCOEF;     // plus their deltas
  localparam int CEP_SHIFT   = 13;   // Q6.10 * Q0.7 -> Q11.4
  localparam real FS_HZ      = 8000.0;
  localparam real PI         = 3.14159265358979323846;

  // MFCC RAM word index inside one frame
  localparam int IDX_ENERGY = NCEP;    // log energy after the 12 cepstra
  localparam int IDX_DELTA  = NCOEF;   // 13 deltas follow

  // Controller: the two states of the control FSM, and the step the
  // datapath is in while the FSM is Active.
  typedef enum logic {FSM_IDLE, FSM_ACTIVE} fsm_e;
  typedef enum logic [3:0] {
    ST_LOAD,    // read 80 samples: pre-emphasis, window, FFT input, energy
    ST_PAD,     // write the 48 zero samples of the 128-point FFT input
    ST_FFT,     // run the FFT
    ST_AMP,     // amplitude of bins 0..64 into the amplitude register
    ST_MEL,     // mel filter bank, overlap, log of S'
    ST_ENERGY,  // close the sub-frame energy, log of E
    ST_CEP,     // cepstral coefficients
    ST_NEXT,    // next sub-frame
    ST_DELTA,   // delta coefficients of all frames
    ST_DONE
  } step_e;

  // Control signals from the controller to the datapath.
  typedef struct packed {
    logic        clr;            // start of a run: clear the sample history
    logic        rd_en;          // read speech sample sub_idx*80 + cnt
    logic        pad_we;         // write a zero FFT input sample at cnt
    logic        fft_start;
    logic        amp_rd;         // read FFT bin cnt into the amplitude unit
    logic        mel_start;
    logic        energy_finish;  // close the energy of this sub-frame
    logic        cep_start;
    logic        delta_start;
    logic        first;          // sub-frame 0: no complete frame yet
    logic [7:0]  cnt;            // sample or bin index inside the step
    logic [15:0] sub_idx;        // current sub-frame
  } ctl_t;

  function automatic int round_real(real x);
    return $rtoi($floor(x + 0.5));
  endfunction

  function automatic int hamming_coef(int l, int n);
    return round_real(16.0 * (0.54 - 0.46 * $cos(2.0 * PI * l / (n - 1))));
  endfunction

  function automatic int twiddle_re(int k, int n);
    return round_real(64.0 * $cos(2.0 * PI * k / n));
  endfunction

  function automatic int twiddle_im(int k, int n);
    return round_real(-64.0 * $sin(2.0 * PI * k / n));
  endfunction

  // p and k count from 0 here: p = 0 is the first cepstral coefficient.
  function automatic int dct_coef(int p, int k, int nfilt);
    int c;
    c = round_real(128.0 * $cos((k + 0.5) * (p + 1) * PI / nfilt));
    return (c > 127) ? 127 : c;
  endfunction

  function automatic real hz_to_mel(real f);
    return 2595.0 * $log10(1.0 + f / 700.0);
  endfunction

  function automatic real mel_to_hz(real m);
    return 700.0 * ($pow(10.0, m / 2595.0) - 1.0);
  endfunction

  // Position, in FFT bins, of mel edge j (j = 0..nfilt+1).
  function automatic real mel_edge_bin(int j, int nfilt, int nfft);
    real mmax;
    mmax = hz_to_mel(FS_HZ / 2.0);
    return mel_to_hz(mmax * j / (nfilt + 1)) * nfft / FS_HZ;
  endfunction

  // Bin l lies between edges j and j+1: it feeds the rising side of filter
  // j+1 and the falling side of filter j (filters are numbered 1..nfilt;
  // 0 and nfilt+1 are unused).
  function automatic int mel_bin_edge(int l, int nfilt, int nfft);
    int j;
    j = 0;
    for (int e = 1; e <= nfilt; e++)
      if (mel_edge_bin(e, nfilt, nfft) <= l) j = e;
    return j;
  endfunction

  // Rising-side weight of bin l, 0..MEL_ONE.
  function automatic int mel_bin_weight(int l, int nfilt, int nfft);
    int  j;
    real lo, hi;
    j  = mel_bin_edge(l, nfilt, nfft);
    lo = mel_edge_bin(j, nfilt, nfft);
    hi = mel_edge_bin(j + 1, nfilt, nfft);
    return round_real(MEL_ONE * (l - lo) / (hi - lo));
  endfunction

  function automatic int clog2_min1(int n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
