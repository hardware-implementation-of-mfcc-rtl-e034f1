// mfcc_core: MFCC feature extraction core.
//
// Speech samples (16-bit, assumed 8 kHz) are written into the speech RAM by
// the host. A low pulse on start makes the controller Active; the core then
// processes the speech in 80-sample sub-frames. For every sub-frame:
//   pre-emphasis s - 31/32 s_prev -> Hamming window -> 128-point FFT of the
//   zero-padded sub-frame -> amplitude max + min/4 of bins 0..64 ->
//   20-filter mel bank SF_k -> overlap S'_k = SF_k + SF_k(previous)
//   -> log2 -> DCT to 12 cepstral coefficients,
// and, from the raw samples, the energy of the sub-frame, added to that of
// the previous one and logged. A frame is therefore two adjacent sub-frames
// (160 samples, 20 ms), advanced by one sub-frame, and frame n is complete
// after sub-frame n+1. After the last sub-frame the delta unit computes 13
// delta coefficients for every frame. Per frame, the MFCC RAM holds
// C1..C12 (words 0..11, signed Q11.4), log2 energy (12, Q6.9) and the deltas
// (13..25), readable by
// the host through mfcc_raddr / mfcc_rdata (one clock latency); done is high
// when everything is written.
//
// Timing: about 985 clocks per sub-frame (83 load, 48 pad, 450 FFT, 66
// amplitude, about 90 mel/overlap/log, 4 energy, about 243 cepstrum) plus 6
// clocks per delta coefficient: 105,881 clocks from start to done for the
// default 100 sub-frames.
// The blocks and their bus widths follow the core's block diagram; the step
// sequencing, the sizes of the two RAMs, the mel filter count and all
// number formats are this design's choices.
module mfcc_core
  import mfcc_pkg::*;
#(
  parameter int N_SUBFRAMES = 100,
  parameter int NFRAMES     = N_SUBFRAMES - 1,
  parameter int SPCH_DEPTH  = N_SUBFRAMES * SUBFRAME,
  parameter int MFCC_DEPTH  = NFRAMES * FRAME_WORDS,
  parameter int SAW         = $clog2(SPCH_DEPTH),
  parameter int MAW         = $clog2(MFCC_DEPTH)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       spch_we,
  input  logic [SAW-1:0]             spch_waddr,
  input  logic signed [SAMPLE_W-1:0] spch_wdata,
  input  logic [MAW-1:0]             mfcc_raddr,
  output logic signed [CEP_W-1:0]    mfcc_rdata,
  output logic                       active,
  output logic                       done
);
  localparam int NLOG = $clog2(NFFT);
  localparam int BW   = $clog2(NBINS);
  localparam int KW   = $clog2(NFILT);

  ctl_t  ctl;
  logic  fft_done, mel_done, cep_done, delta_done;

  controller #(.N_SUBFRAMES(N_SUBFRAMES)) u_ctl (
    .clk, .rst_n, .start, .fft_done, .mel_done, .cep_done, .delta_done,
    .ctl, .state(), .step(), .active, .done);

  // ---------------- load path: RAM -> pre-emphasis -> window -> FFT ------
  logic signed [SAMPLE_W-1:0] spch_rdata;
  logic                       rd_v1;
  logic [6:0]                 idx1, idx2, idx3;

  speech_ram #(.DEPTH(SPCH_DEPTH), .DW(SAMPLE_W)) u_spch (
    .clk, .we(spch_we), .waddr(spch_waddr), .wdata(spch_wdata),
    .re(ctl.rd_en), .raddr(SAW'(int'(ctl.sub_idx) * SUBFRAME + int'(ctl.cnt))),
    .rdata(spch_rdata));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v1 <= 1'b0;
      idx1  <= '0;
      idx2  <= '0;
      idx3  <= '0;
    end else begin
      rd_v1 <= ctl.rd_en;
      idx1  <= 7'(ctl.cnt);
      idx2  <= idx1;
      idx3  <= idx2;
    end
  end

  logic                    pre_v, win_v;
  logic signed [PRE_W-1:0] pre_d;
  logic signed [WIN_W-1:0] win_d;
  logic [HAM_W-1:0]        ham;

  pre_emphasis u_pre (
    .clk, .rst_n, .clr(ctl.clr), .in_valid(rd_v1), .in_data(spch_rdata),
    .out_valid(pre_v), .out_data(pre_d));

  hamming_rom u_ham (.clk, .addr(idx1), .coef(ham));

  windowing u_win (
    .clk, .rst_n, .in_valid(pre_v), .in_data(pre_d), .coef(ham),
    .out_valid(win_v), .out_data(win_d));

  logic                    fft_busy;
  logic signed [FFT_W-1:0] bin_re, bin_im;

  fft u_fft (
    .clk, .rst_n,
    .ld_en(win_v | ctl.pad_we),
    .ld_addr(ctl.pad_we ? NLOG'(ctl.cnt) : NLOG'(idx3)),
    .ld_data(ctl.pad_we ? '0 : win_d),
    .start(ctl.fft_start), .busy(fft_busy), .done(fft_done),
    .rd_addr(NLOG'(ctl.cnt)), .rd_re(bin_re), .rd_im(bin_im));

  // ---------------- amplitude -> amplitude register -> mel bank ---------
  logic             amp_v;
  logic [AMP_W-1:0] amp_d, amp_rdata;
  logic [BW-1:0]    amp_waddr, amp_raddr;

  amplitude u_amp (
    .clk, .rst_n, .in_valid(ctl.amp_rd), .in_re(bin_re), .in_im(bin_im),
    .out_valid(amp_v), .out_mag(amp_d));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) amp_waddr <= '0;
    else        amp_waddr <= BW'(ctl.cnt);

  coef_buffer #(.DW(AMP_W), .DEPTH(NBINS)) u_amp_reg (
    .clk, .we(amp_v), .waddr(amp_waddr), .wdata(amp_d),
    .raddr(amp_raddr), .rdata(amp_rdata));

  logic [KW-1:0]      prv_raddr, prv_waddr, mel_idx;
  logic [SF_W-1:0]    prv_rdata, prv_wdata;
  logic               prv_we, mel_v;
  logic [SFSUM_W-1:0] mel_d;

  mel_filter u_mel (
    .clk, .rst_n, .start(ctl.mel_start), .done(mel_done),
    .amp_raddr, .amp_rdata, .prv_raddr, .prv_rdata, .prv_we, .prv_waddr, .prv_wdata,
    .out_valid(mel_v), .out_idx(mel_idx), .out_data(mel_d));

  coef_buffer #(.DW(SF_W), .DEPTH(NFILT)) u_sf_reg (
    .clk, .we(prv_we), .waddr(prv_waddr), .wdata(prv_wdata),
    .raddr(prv_raddr), .rdata(prv_rdata));

  // ---------------- energy and the shared logarithm ---------------------
  logic            en_v;
  logic [EN_W-1:0] en_d;

  energy u_energy (
    .clk, .rst_n, .clr(ctl.clr), .in_valid(rd_v1), .in_data(spch_rdata),
    .finish(ctl.energy_finish), .out_valid(en_v), .out_energy(en_d));

  logic             log_v, log_is_en;
  logic [KW-1:0]    log_idx;
  logic [LOG_W-1:0] log_d;

  log2_approx u_log (
    .clk, .rst_n, .in_valid(mel_v | en_v),
    .in_data(mel_v ? mel_d : SFSUM_W'(en_d)),
    .out_valid(log_v), .out_log(log_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      log_is_en <= 1'b0;
      log_idx   <= '0;
    end else begin
      log_is_en <= en_v;
      log_idx   <= mel_idx;
    end
  end

  logic [KW-1:0]    lp_raddr;
  logic [LOG_W-1:0] lp_rdata;

  coef_buffer #(.DW(LOG_W), .DEPTH(NFILT)) u_log_reg (
    .clk, .we(log_v & ~log_is_en), .waddr(log_idx), .wdata(log_d),
    .raddr(lp_raddr), .rdata(lp_rdata));

  // ---------------- cepstrum and delta ----------------------------------
  logic                    cep_v;
  logic [3:0]              cep_idx;
  logic signed [CEP_W-1:0] cep_d;

  cepstrum u_cep (
    .clk, .rst_n, .start(ctl.cep_start), .done(cep_done),
    .log_raddr(lp_raddr), .log_rdata(lp_rdata),
    .out_valid(cep_v), .out_idx(cep_idx), .out_data(cep_d));

  logic [MAW-1:0]          dl_raddr, dl_waddr;
  logic signed [CEP_W-1:0] dl_rdata, dl_wdata;
  logic                    dl_we;

  delta #(.NFRAMES(NFRAMES), .ADDR_W(MAW)) u_delta (
    .clk, .rst_n, .start(ctl.delta_start), .done(delta_done),
    .raddr(dl_raddr), .rdata(dl_rdata), .we(dl_we), .waddr(dl_waddr), .wdata(dl_wdata));

  // ---------------- MFCC RAM ---------------------------------------------
  // frame = sub-frame - 1: frame n is complete after sub-frame n+1
  logic                    m_we;
  logic [MAW-1:0]          m_waddr;
  logic signed [CEP_W-1:0] m_wdata;
  int                      frame_base;

  always_comb begin
    frame_base = (int'(ctl.sub_idx) - 1) * FRAME_WORDS;
    if (dl_we) begin
      m_we    = 1'b1;
      m_waddr = dl_waddr;
      m_wdata = dl_wdata;
    end else if (cep_v) begin
      m_we    = 1'b1;
      m_waddr = MAW'(frame_base + int'(cep_idx));
      m_wdata = cep_d;
    end else begin
      m_we    = log_v & log_is_en & ~ctl.first;
      m_waddr = MAW'(frame_base + IDX_ENERGY);
      m_wdata = CEP_W'(log_d >> 1);   // Q6.9, so that it stays positive
    end
  end

  mfcc_ram #(.DEPTH(MFCC_DEPTH), .DW(CEP_W)) u_mfcc (
    .clk, .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
    .ra(dl_raddr), .rda(dl_rdata), .rb(mfcc_raddr), .rdb(mfcc_rdata));

  // the load port of the FFT is not used while it transforms
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !((win_v | ctl.pad_we) && fft_busy))
    else $error("FFT loaded while busy");
endmodule
