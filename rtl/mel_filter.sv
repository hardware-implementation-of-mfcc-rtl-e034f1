// mel_filter: triangular mel filter bank with sub-frame overlap.
//
//   SF_k  = sum over bins l of |X(l)| * Mel_k(l)      (one sub-frame)
//   S'_k  = SF_k + SF_k(previous sub-frame)           (one 160-sample frame)
//
// The filters are triangles with unity peak whose K+2 edge frequencies are
// equally spaced on the mel scale Mel(f) = 2595 log10(1 + f/700) from 0 Hz to
// half the (assumed 8 kHz) sample rate. Every bin l lies between two edges
// j and j+1, so it feeds only two filters: the rising side of filter j+1
// with weight w(l) and the falling side of filter j with 128 - w(l) (weights
// unsigned, 128 = 1.0, computed at elaboration). One bin is processed per
// clock with two multipliers; the products are shifted right 7 bits and
// added to 45-bit accumulators.
//
// Timing: start clears the accumulators and reads the amplitude register
// bins 0..NBINS-1 (registered read, one clock latency). Then, filter by
// filter, the previous SF_k is read from the SF' register, S'_k is output
// (out_valid, out_idx = k-1, out_data) and SF_k is written back in its place.
// done pulses in the clock after the last output. About NBINS + NFILT + 3
// clocks per sub-frame. The filter count and the weight format are this
// design's choices.
module mel_filter
  import mfcc_pkg::*;
#(
  parameter int NFILT_P = NFILT,
  parameter int NFFT_P  = NFFT,
  parameter int NBINS_P = NFFT_P / 2 + 1,
  parameter int AW      = AMP_W,
  parameter int SW      = SF_W,
  parameter int OW      = SFSUM_W,
  parameter int MW      = MEL_W,
  parameter int BW      = $clog2(NBINS_P),
  parameter int KW      = (NFILT_P <= 2) ? 1 : $clog2(NFILT_P)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          done,
  output logic [BW-1:0] amp_raddr,
  input  logic [AW-1:0] amp_rdata,
  output logic [KW-1:0] prv_raddr,
  input  logic [SW-1:0] prv_rdata,
  output logic          prv_we,
  output logic [KW-1:0] prv_waddr,
  output logic [SW-1:0] prv_wdata,
  output logic          out_valid,
  output logic [KW-1:0] out_idx,
  output logic [OW-1:0] out_data
);
  localparam int JW = $clog2(NFILT_P + 2);

  typedef logic [JW-1:0] edge_t [NBINS_P];
  typedef logic [MW-1:0] wgt_t  [NBINS_P];

  function automatic edge_t build_edge();
    edge_t t;
    for (int l = 0; l < NBINS_P; l++) t[l] = JW'(mel_bin_edge(l, NFILT_P, NFFT_P));
    return t;
  endfunction

  function automatic wgt_t build_wgt();
    wgt_t t;
    for (int l = 0; l < NBINS_P; l++) t[l] = MW'(mel_bin_weight(l, NFILT_P, NFFT_P));
    return t;
  endfunction

  localparam edge_t EDGE = build_edge();
  localparam wgt_t  WGT  = build_wgt();

  typedef enum logic [1:0] {M_IDLE, M_BINS, M_OVL, M_DONE} phase_e;
  phase_e phase;

  logic [SW-1:0] acc [NFILT_P + 2];   // filters 1..NFILT_P; 0 and NFILT_P+1 unused
  logic [BW-1:0] bin, bin_d;
  logic          bin_v;
  logic [KW-1:0] k, k_d;
  logic          k_v;
  logic [JW-1:0] j;
  logic [MW-1:0] w;
  logic [AW+MW-1:0] up, dn;

  always_comb begin
    j  = EDGE[bin_d];
    w  = WGT[bin_d];
    up = (AW+MW)'(amp_rdata) * (AW+MW)'(w);
    dn = (AW+MW)'(amp_rdata) * (AW+MW)'(MW'(MEL_ONE) - w);
    amp_raddr = bin;
    prv_raddr = k;
    prv_we    = k_v;
    prv_waddr = k_d;
    prv_wdata = acc[int'(k_d) + 1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= M_IDLE;
      bin       <= '0;
      bin_d     <= '0;
      bin_v     <= 1'b0;
      k         <= '0;
      k_d       <= '0;
      k_v       <= 1'b0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
      for (int i = 0; i < NFILT_P + 2; i++) acc[i] <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      bin_v     <= 1'b0;
      k_v       <= 1'b0;
      bin_d     <= bin;
      k_d       <= k;
      if (bin_v) begin
        acc[int'(j) + 1] <= acc[int'(j) + 1] + SW'(up >> $clog2(MEL_ONE));
        acc[int'(j)]     <= acc[int'(j)]     + SW'(dn >> $clog2(MEL_ONE));
      end
      if (k_v) begin
        out_valid <= 1'b1;
        out_idx   <= k_d;
        out_data  <= OW'(acc[int'(k_d) + 1]) + OW'(prv_rdata);
      end
      unique case (phase)
        M_IDLE: if (start) begin
          for (int i = 0; i < NFILT_P + 2; i++) acc[i] <= '0;
          bin   <= '0;
          phase <= M_BINS;
        end
        M_BINS: begin
          bin_v <= 1'b1;
          if (int'(bin) == NBINS_P - 1) begin
            k     <= '0;
            phase <= M_OVL;
          end else begin
            bin <= bin + 1'b1;
          end
        end
        M_OVL: begin
          // the last bin is accumulated in the first clock of this phase,
          // one clock before filter k=NFILT_P is read
          k_v <= 1'b1;
          if (int'(k) == NFILT_P - 1) phase <= M_DONE;
          else k <= k + 1'b1;
        end
        M_DONE: if (!k_v) begin
          done  <= 1'b1;
          phase <= M_IDLE;
        end
      endcase
    end
  end
endmodule
