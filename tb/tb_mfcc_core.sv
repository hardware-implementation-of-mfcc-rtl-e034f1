// tb_mfcc_core: end-to-end test of the MFCC core at a reduced size (6 sub-frames).
//
// A synthetic speech signal (two tones plus noise whose loudness changes from
// sub-frame to sub-frame, with silent and near-full-scale sub-frames) is
// written into the speech RAM. The test then
//  1. starts a run and abandons it part-way (start low again),
//  2. starts a complete run, waits for done and reads every word of the MFCC
//     RAM through the host port, comparing it bit for bit with a separate
//     reference model of the whole chain (pre-emphasis, window, FFT,
//     amplitude, mel bank with overlap, log, DCT, energy, deltas),
//  3. leaves Active, loads new speech and repeats the complete run, which
//     shows that a new run starts from a clean sample history.
// It counts how often each mechanism happened (Idle->Active and
// Active->Idle moves, an abort, sub-frame loads, zero padding, FFTs,
// overlap sums, log-energy writes, cepstra, deltas) and fails if one never
// did. The run length is checked against about 1100 clocks per sub-frame.
module tb_mfcc_core;
  import mfcc_pkg::*;
  import mfcc_ref_pkg::*;
  localparam int NS  = 6;
  localparam int NFR = NS - 1;
  localparam int SAW = $clog2(NS * 80);
  localparam int MAW = $clog2(NFR * 26);

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, start = 1, spch_we = 0, active, done;
  logic [SAW-1:0] spch_waddr = 0;
  logic signed [15:0] spch_wdata = 0;
  logic [MAW-1:0] mfcc_raddr = 0;
  logic signed [15:0] mfcc_rdata;

  mfcc_core #(.N_SUBFRAMES(NS)) dut (.*);

  // ---- mechanism counters ----
  int n_to_active = 0, n_to_idle = 0, n_abort = 0, n_load = 0, n_pad = 0, n_fft = 0;
  int n_overlap = 0, n_logen = 0, n_cep = 0, n_delta = 0;
  fsm_e  st_q = FSM_IDLE;
  step_e step_q = ST_DONE;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_ctl.state != st_q) begin
      if (dut.u_ctl.state == FSM_ACTIVE) n_to_active++; else n_to_idle++;
      if (dut.u_ctl.state == FSM_IDLE && step_q != ST_DONE) n_abort++;
    end
    st_q   = dut.u_ctl.state;
    step_q = dut.u_ctl.step;
    n_load    += (dut.ctl.rd_en && dut.ctl.cnt == 0);
    n_pad     += dut.ctl.pad_we;
    n_fft     += dut.fft_done;
    n_overlap += (dut.mel_v && !dut.ctl.first);
    n_logen   += (dut.m_we && !dut.cep_v && !dut.dl_we);
    n_cep     += dut.cep_v;
    n_delta   += dut.dl_we;
  end

  initial begin
    repeat (NS * 2600 + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [];

  task automatic make_speech(int seed);
    int a;
    x = new[NS * 80];
    for (int s = 0; s < NS; s++) begin
      a = (s % 5 == 2) ? 0 : (s % 7 == 3) ? 26000 : 1500 + (s * 997 + seed * 131) % 9000;
      for (int l = 0; l < 80; l++) begin
        int n = s * 80 + l;
        real v = a * (0.6 * $sin(2.0 * PI_R * (440.0 + 37.0 * seed) * n / 8000.0)
                    + 0.3 * $sin(2.0 * PI_R * 1700.0 * n / 8000.0 + 1.0));
        if (a != 0) v += real'(int'($urandom % 401) - 200) * a / 4000.0;
        x[n] = rnd(v);
      end
    end
    for (int n = 0; n < NS * 80; n++) begin
      @(negedge clk); spch_we = 1; spch_waddr = SAW'(n); spch_wdata = 16'(x[n]);
    end
    @(negedge clk); spch_we = 0;
  endtask

  task automatic pulse_start();
    @(negedge clk); start = 0;
    @(negedge clk); start = 1;
  endtask

  task automatic full_run();
    int expv [];
    int cycles;
    pulse_start();
    checks++;
    if (!active) begin failures++; $display("FAIL not Active after start pulse"); end
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles > NS * 1100 + NFR * 13 * 6 + 100) begin failures++; $display("FAIL run took %0d clocks", cycles); end
    $display("run of %0d sub-frames: %0d clocks", NS, cycles);
    ref_mfcc(NS, NFILT, x, expv);
    for (int a = 0; a < NFR * 26; a++) begin
      mfcc_raddr = MAW'(a);
      @(negedge clk);
      checks++;
      if (int'(mfcc_rdata) != expv[a]) begin
        failures++;
        if (failures < 20) $display("FAIL frame %0d word %0d: %0d expected %0d", a / 26, a % 26, mfcc_rdata, expv[a]);
      end
    end
    pulse_start();
    checks++;
    if (active || done) begin failures++; $display("FAIL did not return to Idle"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_speech(1);
    // abandoned run
    pulse_start();
    repeat (700) @(negedge clk);
    pulse_start();
    checks++;
    if (active) begin failures++; $display("FAIL abort did not leave Active"); end
    full_run();
    make_speech(2);
    full_run();
    repeat (2) @(negedge clk);
    checks += 10;
    if (n_to_active < 3) begin failures++; $display("FAIL Idle->Active %0d", n_to_active); end
    if (n_to_idle < 3)   begin failures++; $display("FAIL Active->Idle %0d", n_to_idle); end
    if (n_abort < 1)     begin failures++; $display("FAIL no abort"); end
    if (n_load < 2 * NS) begin failures++; $display("FAIL loads %0d", n_load); end
    if (n_pad < 2 * NS * 48) begin failures++; $display("FAIL pads %0d", n_pad); end
    if (n_fft < 2 * NS)  begin failures++; $display("FAIL FFTs %0d", n_fft); end
    if (n_overlap != 2 * NFR * NFILT) begin failures++; $display("FAIL overlap sums %0d", n_overlap); end
    if (n_logen != 2 * NFR) begin failures++; $display("FAIL log energy writes %0d", n_logen); end
    if (n_cep != 2 * NFR * 12) begin failures++; $display("FAIL cepstra %0d", n_cep); end
    if (n_delta != 2 * NFR * 13) begin failures++; $display("FAIL deltas %0d", n_delta); end
    $display("mechanisms: to_active=%0d to_idle=%0d abort=%0d loads=%0d pads=%0d ffts=%0d overlap=%0d log_energy=%0d cepstra=%0d deltas=%0d",
             n_to_active, n_to_idle, n_abort, n_load, n_pad, n_fft, n_overlap, n_logen, n_cep, n_delta);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
