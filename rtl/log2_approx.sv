// log2_approx: piecewise-linear base-2 logarithm, log2(N) ~ k + m.
//
// k is the position of the leading one of N and m is the bits below it read
// as a binary fraction, which is exact at powers of two and at most 0.086
// low in between. The result is unsigned Q6.10: k in bits 15..10 and the ten
// bits that follow the leading one in bits 9..0 (zero-filled when N has fewer
// bits). N = 0 gives 0. The input is 46 bits wide for the mel path; the 39-bit
// energy is zero-extended. One register stage: out_valid follows in_valid by
// one clock. The output format is this design's choice.
module log2_approx
  import mfcc_pkg::*;
#(
  parameter int IW   = SFSUM_W,
  parameter int OW   = LOG_W,
  parameter int FRAC = LOG_FRAC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [IW-1:0] in_data,
  output logic          out_valid,
  output logic [OW-1:0] out_log
);
  localparam int KW = OW - FRAC;

  logic [KW-1:0]      k;
  logic [IW+FRAC-1:0] aligned;
  logic [FRAC-1:0]    m;

  always_comb begin
    k = '0;
    for (int i = 0; i < IW; i++)
      if (in_data[i]) k = KW'(i);
    // shift the leading one to bit IW+FRAC-1; the FRAC bits below it are m
    aligned = {in_data, FRAC'(0)} << (IW - 1 - int'(k));
    m       = aligned[IW+FRAC-2 -: FRAC];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_log   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_log <= {k, m};
    end
  end
endmodule
