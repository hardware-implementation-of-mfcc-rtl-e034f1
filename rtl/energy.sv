// energy: frame energy E_n = sum of s^2 over the two 80-sample sub-frames
// that make frame n.
//
// Each raw 16-bit sample (in_valid) is squared and added to the running
// sub-frame sum. finish closes the sub-frame: in the next clock out_energy
// holds this sub-frame's sum plus the previous one's and out_valid is high
// for one clock; the sum is then kept as "previous" and the running sum
// restarts at zero. clr forgets both sums (start of a new run). The 39-bit
// result is the width of the block diagram; the top bit is always zero.
// finish and in_valid must not be asserted in the same clock.
module energy
  import mfcc_pkg::*;
#(
  parameter int IW = SAMPLE_W,
  parameter int OW = EN_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  input  logic                 finish,
  output logic                 out_valid,
  output logic        [OW-1:0] out_energy
);
  logic [OW-2:0]   acc, prev;
  logic [2*IW-1:0] sq;

  always_comb sq = (2*IW)'(in_data * in_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      prev       <= '0;
      out_valid  <= 1'b0;
      out_energy <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clr) begin
        acc  <= '0;
        prev <= '0;
      end else if (finish) begin
        out_energy <= OW'(acc) + OW'(prev);
        out_valid  <= 1'b1;
        prev       <= acc;
        acc        <= '0;
      end else if (in_valid) begin
        acc <= acc + (OW-1)'(sq);
      end
    end
  end
endmodule
