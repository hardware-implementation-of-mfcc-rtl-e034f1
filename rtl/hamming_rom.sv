// hamming_rom: the Hamming window coefficients of one 80-sample sub-frame.
//
// Entry l (0..N-1) holds round(16 * (0.54 - 0.46 cos(2 pi l / (N-1)))), an
// unsigned 5-bit value with 16 = 1.0 (range 1..16). The table is computed at
// elaboration. Registered read: coef appears the cycle after addr. The
// 5-bit width is the diagram's; the scaling is this design's choice.
module hamming_rom
  import mfcc_pkg::*;
#(
  parameter int N  = SUBFRAME,
  parameter int CW = HAM_W,
  parameter int AW = (N <= 2) ? 1 : $clog2(N)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [CW-1:0] coef
);
  typedef logic [CW-1:0] table_t [N];

  function automatic table_t build();
    table_t t;
    for (int l = 0; l < N; l++) t[l] = CW'(hamming_coef(l, N));
    return t;
  endfunction

  localparam table_t TABLE = build();

  always_ff @(posedge clk) coef <= TABLE[addr];
endmodule
