// windowing: multiplies a pre-emphasised sample by its Hamming coefficient,
// wsf(l) = sf(l) * ham(l).
//
// The 17-bit signed sample times the 5-bit unsigned coefficient (16 = 1.0,
// maximum 16) fits the 21-bit output bus without loss. One register stage:
// out_valid follows in_valid by one clock. The coefficient must be presented
// in the same cycle as the sample.
module windowing
  import mfcc_pkg::*;
#(
  parameter int IW = PRE_W,
  parameter int CW = HAM_W,
  parameter int OW = WIN_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  input  logic        [CW-1:0] coef,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_data
);
  logic signed [OW-1:0] prod;

  // the low OW bits of the product do not depend on signedness
  always_comb prod = OW'(in_data) * OW'(coef);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= prod;
    end
  end
endmodule
