// twiddle_rom: twiddle factors W^k = exp(-j 2 pi k / N), k = 0..N/2-1.
//
// Each part is a signed 8-bit Q1.6 number (64 = 1.0), so +1 and -1 are exact:
// w_re = round(64 cos(2 pi k/N)), w_im = round(-64 sin(2 pi k/N)). The table
// is computed at elaboration. The read is combinational because the FFT
// consumes one twiddle per clock. The 8-bit width is the diagram's; the
// format is this design's choice.
module twiddle_rom
  import mfcc_pkg::*;
#(
  parameter int N  = NFFT,
  parameter int TW = TW_W,
  parameter int AW = $clog2(N) - 1
) (
  input  logic        [AW-1:0] addr,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im
);
  typedef logic signed [TW-1:0] table_t [N/2];

  function automatic table_t build(bit im);
    table_t t;
    for (int k = 0; k < N / 2; k++) t[k] = TW'(im ? twiddle_im(k, N) : twiddle_re(k, N));
    return t;
  endfunction

  localparam table_t TABLE_RE = build(1'b0);
  localparam table_t TABLE_IM = build(1'b1);

  always_comb begin
    w_re = TABLE_RE[addr];
    w_im = TABLE_IM[addr];
  end
endmodule
