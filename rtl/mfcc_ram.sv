// mfcc_ram: the RAM that holds the feature vectors ("Vector MFCC").
//
// Each frame takes FRAME_WORDS = 26 consecutive 16-bit words: cepstral
// coefficients C1..C12 at 0..11, the log energy at 12 and the 13 delta
// coefficients at 13..25. One synchronous write port (shared by the log,
// cepstrum and delta units), read port A for the delta unit and read port B
// for the host; both reads return data the cycle after the address. The
// layout and ports are this design's choices.
module mfcc_ram #(
  parameter int DEPTH = 99 * 26,
  parameter int DW    = 16,
  parameter int AW    = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] ra,
  output logic [DW-1:0] rda,
  input  logic [AW-1:0] rb,
  output logic [DW-1:0] rdb
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rda <= mem[ra];
    rdb <= mem[rb];
  end
endmodule
