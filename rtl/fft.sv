// fft: 128-point radix-2 decimation-in-time FFT of one real sub-frame.
//
// The transform runs in place on a 128-word complex register array, one
// butterfly per clock: log2(N) = 7 stages of N/2 = 64 butterflies, 448 clocks
// from start to done. Samples are written through the load port in natural
// order (ld_addr = time index) and stored at the bit-reversed address, so
// the results come out in natural order on the read port (rd_addr = bin,
// combinational read). Inputs are real; the caller writes zeros for the
// samples 80..127 that pad the sub-frame. Parts are 40 bits wide with no
// scaling between stages (the growth of at most 7 bits fits easily); the
// twiddle product, Q1.6, is rounded back by 6 bits. done is a one-clock
// pulse in the clock after the last butterfly; busy is high from the clock
// after start until then. Load and read must not be used while busy.
// The bus widths are those of the block diagram; the radix-2 in-place
// organisation is this design's choice.
module fft
  import mfcc_pkg::*;
#(
  parameter int N  = NFFT,
  parameter int IW = WIN_W,
  parameter int DW = FFT_W,
  parameter int TW = TW_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ld_en,
  input  logic [$clog2(N)-1:0] ld_addr,
  input  logic signed [IW-1:0] ld_data,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  input  logic [$clog2(N)-1:0] rd_addr,
  output logic signed [DW-1:0] rd_re,
  output logic signed [DW-1:0] rd_im
);
  localparam int LN = $clog2(N);
  localparam int SW = $clog2(LN) + 1;

  logic signed [DW-1:0] mem_re [N];
  logic signed [DW-1:0] mem_im [N];

  logic [SW-1:0]   stage;
  logic [LN-2:0]   bf;        // butterfly inside the stage
  logic [LN-1:0]   i0, i1;
  logic [LN-2:0]   tw_addr;
  logic signed [TW-1:0] w_re, w_im;
  logic signed [DW-1:0] a_re, a_im, b_re, b_im, t_re, t_im;
  logic signed [DW+TW:0] p_re, p_im;

  function automatic logic [LN-1:0] bitrev(logic [LN-1:0] x);
    for (int i = 0; i < LN; i++) bitrev[i] = x[LN-1-i];
  endfunction

  twiddle_rom #(.N(N), .TW(TW)) u_tw (.addr(tw_addr), .w_re(w_re), .w_im(w_im));

  always_comb begin
    logic [LN-1:0] low_mask, span;
    span     = LN'(1) << stage;
    low_mask = span - LN'(1);
    i0       = ((LN'(bf) & ~low_mask) << 1) | (LN'(bf) & low_mask);
    i1       = i0 | span;
    tw_addr  = (LN-1)'((LN'(bf) & low_mask) << (LN - 1 - int'(stage)));
    a_re = mem_re[i0];  a_im = mem_im[i0];
    b_re = mem_re[i1];  b_im = mem_im[i1];
    // t = b * W, rounded from Q.6 back to integer
    p_re = (DW+TW+1)'(b_re) * w_re - (DW+TW+1)'(b_im) * w_im + (DW+TW+1)'(32);
    p_im = (DW+TW+1)'(b_re) * w_im + (DW+TW+1)'(b_im) * w_re + (DW+TW+1)'(32);
    t_re = DW'(p_re >>> 6);
    t_im = DW'(p_im >>> 6);
    rd_re = mem_re[rd_addr];
    rd_im = mem_im[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (ld_en && !busy) begin
      mem_re[bitrev(ld_addr)] <= DW'(ld_data);
      mem_im[bitrev(ld_addr)] <= '0;
    end else if (busy) begin
      mem_re[i0] <= a_re + t_re;
      mem_im[i0] <= a_im + t_im;
      mem_re[i1] <= a_re - t_re;
      mem_im[i1] <= a_im - t_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= '0;
      bf    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          stage <= '0;
          bf    <= '0;
        end
      end else begin
        bf <= bf + 1'b1;
        if (&bf) begin
          if (int'(stage) == LN - 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            stage <= stage + 1'b1;
          end
        end
      end
    end
  end
endmodule
