// pre_emphasis: first-order high-pass filter s'_i = s_i - (31/32) s_(i-1).
//
// The coefficient 31/32 (close to the usual 0.95) needs no multiplier:
// 32 s_i - 31 s_(i-1) = 32 (s_i - s_(i-1)) + s_(i-1) is formed exactly and
// shifted right 5 bits (arithmetic, i.e. floor). A 16-bit input gives a
// 17-bit output, as in the block diagram. The previous sample is kept across
// sub-frames, because the speech is one continuous stream; it is zero after
// reset and after clr. One register stage: out_valid follows in_valid by one
// clock. Rounding and the clear input are this design's choices.
module pre_emphasis
  import mfcc_pkg::*;
#(
  parameter int IW = SAMPLE_W,
  parameter int OW = PRE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_data
);
  logic signed [IW-1:0] prev;
  logic signed [IW+6:0] diff32;   // 32 s_i - 31 s_(i-1)

  always_comb
    diff32 = ((IW+7)'(in_data) <<< 5) - ((IW+7)'(prev) <<< 5) + (IW+7)'(prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (clr) begin
        prev <= '0;
      end else if (in_valid) begin
        prev     <= in_data;
        out_data <= OW'(diff32 >>> 5);
      end
    end
  end
endmodule
