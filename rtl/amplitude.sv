// amplitude: approximate magnitude of one complex FFT bin,
// M = max(|I|, |Q|) + min(|I|, |Q|) / 4.
//
// The division is a 2-bit right shift. 40-bit signed parts give a 41-bit
// result as in the block diagram (the top bit is always zero). One register
// stage: out_valid follows in_valid by one clock.
module amplitude
  import mfcc_pkg::*;
#(
  parameter int DW = FFT_W,
  parameter int OW = AMP_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic        [OW-1:0] out_mag
);
  logic [DW-1:0] abs_i, abs_q, mx, mn;

  always_comb begin
    abs_i = in_re[DW-1] ? DW'(-in_re) : DW'(in_re);
    abs_q = in_im[DW-1] ? DW'(-in_im) : DW'(in_im);
    mx    = (abs_i > abs_q) ? abs_i : abs_q;
    mn    = (abs_i > abs_q) ? abs_q : abs_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_mag <= OW'(mx) + OW'(mn >> 2);
    end
  end
endmodule
