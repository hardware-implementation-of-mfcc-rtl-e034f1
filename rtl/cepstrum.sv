// cepstrum: cepstral coefficients of one frame by a discrete cosine
// transform of the log filter outputs,
//   C_p = sum_{k=1..K} log(S'_k) cos((k - 0.5) p pi / K),   p = 1..12.
//
// One multiply-accumulate per clock: for every p the K log values are read
// from the log power register and the matching coefficients from cos_rom
// (both registered reads, one clock latency). The 16-bit unsigned Q6.10 log
// times the Q0.7 coefficient is summed, and the sum is shifted right 13 bits
// to a signed 16-bit Q11.4 coefficient, which cannot overflow for 20 filters.
// Timing: after start, C_p is output (out_valid, out_idx = p-1) every K
// clocks; done pulses with the last one, NCEP*K + 2 clocks after start.
// The MAC organisation and the output scaling are this design's choices.
module cepstrum
  import mfcc_pkg::*;
#(
  parameter int NCEP_P  = NCEP,
  parameter int NFILT_P = NFILT,
  parameter int LW      = LOG_W,
  parameter int CW      = CEP_W,
  parameter int KCW     = COS_W,
  parameter int SHIFT   = CEP_SHIFT,
  parameter int PW      = (NCEP_P <= 2) ? 1 : $clog2(NCEP_P),
  parameter int KW      = (NFILT_P <= 2) ? 1 : $clog2(NFILT_P)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 done,
  output logic        [KW-1:0] log_raddr,
  input  logic        [LW-1:0] log_rdata,
  output logic                 out_valid,
  output logic        [PW-1:0] out_idx,
  output logic signed [CW-1:0] out_data
);
  localparam int AW = LW + KCW + 1 + $clog2(NFILT_P);   // accumulator

  logic                  run;
  logic [PW-1:0]         p, p_d;
  logic [KW-1:0]         k, k_d;
  logic                  v_d;
  logic signed [KCW-1:0] coef;
  logic signed [AW-1:0]  prod, acc, sum;

  cos_rom #(.NCEP_P(NCEP_P), .NFILT_P(NFILT_P), .CW(KCW)) u_cos (
    .clk(clk), .p(p), .k(k), .coef(coef));

  always_comb begin
    log_raddr = k;
    prod = AW'($signed({1'b0, log_rdata})) * AW'(coef);
    sum  = (k_d == '0) ? prod : acc + prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      p         <= '0;
      k         <= '0;
      p_d       <= '0;
      k_d       <= '0;
      v_d       <= 1'b0;
      acc       <= '0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      v_d       <= run;
      p_d       <= p;
      k_d       <= k;
      if (run) begin
        if (int'(k) == NFILT_P - 1) begin
          k <= '0;
          if (int'(p) == NCEP_P - 1) run <= 1'b0;
          else p <= p + 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end else if (start) begin
        run <= 1'b1;
        p   <= '0;
        k   <= '0;
      end
      if (v_d) begin
        acc <= sum;
        if (int'(k_d) == NFILT_P - 1) begin
          out_valid <= 1'b1;
          out_idx   <= p_d;
          out_data  <= CW'(sum >>> SHIFT);
          if (int'(p_d) == NCEP_P - 1) done <= 1'b1;
        end
      end
    end
  end
endmodule
