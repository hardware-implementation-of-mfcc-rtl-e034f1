// speech_ram: the RAM that holds the input speech samples.
//
// The core reads one 16-bit sample per cycle from it, sub-frame after
// sub-frame; the host fills it beforehand through the write port. Simple
// dual-port memory: one synchronous write port and one synchronous read port
// whose data appears the cycle after re. The depth (8000 samples, one second
// at the assumed 8 kHz rate) and the port arrangement are this design's
// choices; the speech RAM itself is part of the core's block diagram.
module speech_ram #(
  parameter int DEPTH = 8000,
  parameter int DW    = 16,
  parameter int AW    = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
