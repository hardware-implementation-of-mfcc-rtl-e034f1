// cos_rom: the DCT coefficients cos((k - 0.5) p pi / K) of the cepstrum unit.
//
// Addressed by p-1 (0..NCEP-1) and k-1 (0..NFILT-1); each entry is a signed
// 8-bit Q0.7 value round(128 cos(...)), clipped to 127 (-128 = -1.0 is exact).
// The table is computed at elaboration. Registered read: coef appears the
// cycle after the address. The 8-bit width is the diagram's; the format is
// this design's choice.
module cos_rom
  import mfcc_pkg::*;
#(
  parameter int NCEP_P  = NCEP,
  parameter int NFILT_P = NFILT,
  parameter int CW      = COS_W,
  parameter int PW      = (NCEP_P <= 2) ? 1 : $clog2(NCEP_P),
  parameter int KW      = (NFILT_P <= 2) ? 1 : $clog2(NFILT_P)
) (
  input  logic                 clk,
  input  logic        [PW-1:0] p,
  input  logic        [KW-1:0] k,
  output logic signed [CW-1:0] coef
);
  typedef logic signed [CW-1:0] table_t [NCEP_P * NFILT_P];

  function automatic table_t build();
    table_t t;
    for (int pi_ = 0; pi_ < NCEP_P; pi_++)
      for (int ki = 0; ki < NFILT_P; ki++)
        t[pi_ * NFILT_P + ki] = CW'(dct_coef(pi_, ki, NFILT_P));
    return t;
  endfunction

  localparam table_t TABLE = build();

  always_ff @(posedge clk) coef <= TABLE[int'(p) * NFILT_P + int'(k)];
endmodule
