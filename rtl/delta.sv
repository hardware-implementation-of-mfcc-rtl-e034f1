// delta: delta (velocity) coefficients of every frame,
//   d_n = 2 (c_(n+2) - c_(n-2)) + (c_(n+1) - c_(n-1)),
// for each of the 13 static coefficients (12 cepstra and log energy).
//
// The unit runs once, after all frames are in the MFCC RAM. For every frame
// n and coefficient i it reads c_(n-2), c_(n-1), c_(n+1), c_(n+2) through
// its read port (one clock latency, one read per clock), then writes d_n to
// word IDX_DELTA + i of frame n: six clocks per coefficient. Near the first
// and last frames a missing neighbour is replaced by the nearest existing
// frame. The result is saturated to 16 bits. done pulses after the last
// write. The boundary rule and the saturation are this design's choices.
module delta
  import mfcc_pkg::*;
#(
  parameter int NFRAMES = 99,
  parameter int NCOEF_P = NCOEF,
  parameter int FWORDS  = FRAME_WORDS,
  parameter int DOFS    = IDX_DELTA,
  parameter int W       = CEP_W,
  parameter int ADDR_W  = $clog2(NFRAMES * FWORDS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                done,
  output logic [ADDR_W-1:0]   raddr,
  input  logic signed [W-1:0] rdata,
  output logic                we,
  output logic [ADDR_W-1:0]   waddr,
  output logic signed [W-1:0] wdata
);
  logic        run;
  int unsigned n, i;       // frame, coefficient
  logic [2:0]  step;       // 0..3 read, 1..4 capture, 5 write
  logic signed [W-1:0] v [4];
  logic signed [W+3:0] d;
  int          nb;         // neighbour frame of this read

  function automatic int clamp_frame(int x);
    if (x < 0) return 0;
    if (x > NFRAMES - 1) return NFRAMES - 1;
    return x;
  endfunction

  always_comb begin
    unique case (step)
      3'd0:    nb = clamp_frame(int'(n) - 2);
      3'd1:    nb = clamp_frame(int'(n) - 1);
      3'd2:    nb = clamp_frame(int'(n) + 1);
      default: nb = clamp_frame(int'(n) + 2);
    endcase
    raddr = ADDR_W'(nb * FWORDS + int'(i));
    d = ((W+4)'(v[3]) - (W+4)'(v[0])) * 2 + ((W+4)'(v[2]) - (W+4)'(v[1]));
    we    = run && step == 3'd5;
    waddr = ADDR_W'(int'(n) * FWORDS + DOFS + int'(i));
    if (d > (W+4)'(2**(W-1) - 1))   wdata = W'(2**(W-1) - 1);
    else if (d < -(W+4)'(2**(W-1))) wdata = W'(-(2**(W-1)));
    else                            wdata = W'(d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      n    <= 0;
      i    <= 0;
      step <= '0;
      done <= 1'b0;
      for (int r = 0; r < 4; r++) v[r] <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run  <= 1'b1;
          n    <= 0;
          i    <= 0;
          step <= '0;
        end
      end else begin
        if (step >= 3'd1 && step <= 3'd4) v[2'(step - 3'd1)] <= rdata;
        if (step == 3'd5) begin
          step <= '0;
          if (i == NCOEF_P - 1) begin
            i <= 0;
            if (n == NFRAMES - 1) begin
              run  <= 1'b0;
              done <= 1'b1;
            end else begin
              n <= n + 1;
            end
          end else begin
            i <= i + 1;
          end
        end else begin
          step <= step + 3'd1;
        end
      end
    end
  end
endmodule
