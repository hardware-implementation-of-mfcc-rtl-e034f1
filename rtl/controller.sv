// controller: the control state machine of the MFCC core.
//
// Two states, Idle and Active. Reset (rst_n low) enters Idle. In either
// state start = 1 keeps the state and start = 0 moves to the other one, so
// start behaves as an active-low request: hold it high, pull it low for one
// clock to begin a run, and again to abandon or leave a finished run.
//
// While Active, a step register sequences the datapath through every
// sub-frame: LOAD (read the 80 samples, cnt = 0..82 to let the 3-clock
// read/pre-emphasis/window pipeline drain), PAD (write the 48 zero FFT inputs,
// cnt = 80..127), FFT (start, wait for fft_done), AMP (read bins 0..64, one
// extra clock for the amplitude register), MEL (start, wait for mel_done),
// ENERGY (close the sub-frame energy and log it: 4 clocks), CEP (start, wait
// for cep_done; skipped for sub-frame 0, which has no complete frame yet),
// NEXT; after the last sub-frame DELTA (start, wait for delta_done) and DONE,
// where done stays high until start leaves Active. Pulses such as fft_start
// are high in the first clock of their step. The two states are as the core
// is specified; the steps inside Active are this design's sequencing.
module controller
  import mfcc_pkg::*;
#(
  parameter int N_SUBFRAMES = 100,
  parameter int SUBFRAME_P  = SUBFRAME,
  parameter int NFFT_P      = NFFT,
  parameter int NBINS_P     = NFFT_P / 2 + 1,
  parameter int LOAD_LAT    = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  fft_done,
  input  logic  mel_done,
  input  logic  cep_done,
  input  logic  delta_done,
  output ctl_t  ctl,
  output fsm_e  state,
  output step_e step,
  output logic  active,
  output logic  done
);
  logic [7:0]  cnt;
  logic [15:0] sub;
  logic        clr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= FSM_IDLE;
      step  <= ST_DONE;
      cnt   <= '0;
      sub   <= '0;
      clr   <= 1'b0;
    end else begin
      clr <= 1'b0;
      if (!start) begin
        // Fig. 5: start = 0 toggles between Idle and Active
        if (state == FSM_IDLE) begin
          state <= FSM_ACTIVE;
          step  <= ST_LOAD;
          cnt   <= '0;
          sub   <= '0;
          clr   <= 1'b1;
        end else begin
          state <= FSM_IDLE;
          step  <= ST_DONE;
        end
      end else if (state == FSM_ACTIVE) begin
        unique case (step)
          ST_LOAD:
            if (int'(cnt) == SUBFRAME_P + LOAD_LAT - 1) begin
              step <= ST_PAD;
              cnt  <= 8'(SUBFRAME_P);
            end else cnt <= cnt + 1'b1;
          ST_PAD:
            if (int'(cnt) == NFFT_P - 1) begin
              step <= ST_FFT;
              cnt  <= '0;
            end else cnt <= cnt + 1'b1;
          ST_FFT: begin
            cnt <= 8'd1;
            if (fft_done) begin
              step <= ST_AMP;
              cnt  <= '0;
            end
          end
          ST_AMP:
            if (int'(cnt) == NBINS_P) begin
              step <= ST_MEL;
              cnt  <= '0;
            end else cnt <= cnt + 1'b1;
          ST_MEL: begin
            cnt <= 8'd1;
            if (mel_done) begin
              step <= ST_ENERGY;
              cnt  <= '0;
            end
          end
          ST_ENERGY:
            if (cnt == 8'd3) begin
              step <= (sub == '0) ? ST_NEXT : ST_CEP;
              cnt  <= '0;
            end else cnt <= cnt + 1'b1;
          ST_CEP: begin
            cnt <= 8'd1;
            if (cep_done) begin
              step <= ST_NEXT;
              cnt  <= '0;
            end
          end
          ST_NEXT: begin
            cnt <= '0;
            if (int'(sub) == N_SUBFRAMES - 1) step <= ST_DELTA;
            else begin
              sub  <= sub + 1'b1;
              step <= ST_LOAD;
            end
          end
          ST_DELTA: begin
            cnt <= 8'd1;
            if (delta_done) step <= ST_DONE;
          end
          ST_DONE: ;
          default: step <= ST_DONE;
        endcase
      end
    end
  end

  always_comb begin
    logic act;
    act               = (state == FSM_ACTIVE);
    ctl               = '0;
    ctl.clr           = clr;
    ctl.cnt           = cnt;
    ctl.sub_idx       = sub;
    ctl.first         = (sub == '0);
    ctl.rd_en         = act && step == ST_LOAD && int'(cnt) < SUBFRAME_P;
    ctl.pad_we        = act && step == ST_PAD;
    ctl.fft_start     = act && step == ST_FFT && cnt == '0;
    ctl.amp_rd        = act && step == ST_AMP && int'(cnt) < NBINS_P;
    ctl.mel_start     = act && step == ST_MEL && cnt == '0;
    ctl.energy_finish = act && step == ST_ENERGY && cnt == '0;
    ctl.cep_start     = act && step == ST_CEP && cnt == '0;
    ctl.delta_start   = act && step == ST_DELTA && cnt == '0;
    active            = act;
    done              = act && step == ST_DONE;
  end
endmodule
