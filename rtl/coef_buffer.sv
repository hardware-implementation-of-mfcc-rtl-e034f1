// coef_buffer: a small register file between two datapath stages.
//
// The core uses three of them: the amplitude register (65 x 41 bits, one
// magnitude per FFT bin 0..64), the SF' register (20 x 45 bits, the mel filter
// outputs of the previous sub-frame, used for the overlap sum) and the log
// power register (20 x 16 bits, log S' per filter, read by the cepstrum
// unit). Synchronous write; the read data is registered and appears the
// cycle after raddr. Depths and the registered read are this design's choice.
module coef_buffer #(
  parameter int DW    = 41,
  parameter int DEPTH = 65,
  parameter int AW    = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
