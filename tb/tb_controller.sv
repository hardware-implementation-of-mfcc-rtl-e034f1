// tb_controller: plays the datapath units around the controller (done
// pulses a few clocks after each start) for a 3-sub-frame run and checks
//  - the two-state machine: rst_n gives Idle, start = 1 holds Idle and
//    Active, start = 0 moves Idle -> Active and Active -> Idle, including an
//    abort in the middle of a run;
//  - how often each control pulse or strobe occurs per run (80 reads and
//    48 pads per sub-frame, one FFT, 65 amplitude reads, one mel and one
//    energy step per sub-frame, a cepstrum for every sub-frame but the
//    first, one delta pass) and that done comes at the end.
module tb_controller;
  import mfcc_pkg::*;
  localparam int NS = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  rst_n = 0, start = 1;
  logic  fft_done = 0, mel_done = 0, cep_done = 0, delta_done = 0;
  ctl_t  ctl;
  fsm_e  state;
  step_e step;
  logic  active, done;

  controller #(.N_SUBFRAMES(NS)) dut (.*);

  int n_rd, n_pad, n_fft, n_amp, n_mel, n_en, n_cep, n_delta, n_clr;
  int rd_sub [NS];

  // unit models: done some clocks after their start
  initial forever begin
    @(posedge clk);
    if (ctl.fft_start)   fork begin repeat (9) @(posedge clk); #1 fft_done = 1; @(posedge clk); #1 fft_done = 0; end join_none
    if (ctl.mel_start)   fork begin repeat (5) @(posedge clk); #1 mel_done = 1; @(posedge clk); #1 mel_done = 0; end join_none
    if (ctl.cep_start)   fork begin repeat (7) @(posedge clk); #1 cep_done = 1; @(posedge clk); #1 cep_done = 0; end join_none
    if (ctl.delta_start) fork begin repeat (4) @(posedge clk); #1 delta_done = 1; @(posedge clk); #1 delta_done = 0; end join_none
  end

  always @(posedge clk) if (rst_n) begin
    n_rd    += ctl.rd_en;
    n_pad   += ctl.pad_we;
    n_fft   += ctl.fft_start;
    n_amp   += ctl.amp_rd;
    n_mel   += ctl.mel_start;
    n_en    += ctl.energy_finish;
    n_cep   += ctl.cep_start;
    n_delta += ctl.delta_start;
    n_clr   += ctl.clr;
    if (ctl.rd_en) rd_sub[ctl.sub_idx] += 1;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int expv, string what);
    checks++;
    if (got != expv) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, expv); end
  endtask

  task automatic clear_counts();
    n_rd = 0; n_pad = 0; n_fft = 0; n_amp = 0; n_mel = 0; n_en = 0; n_cep = 0; n_delta = 0; n_clr = 0;
    for (int s = 0; s < NS; s++) rd_sub[s] = 0;
  endtask

  initial begin
    int cycles;
    clear_counts();
    repeat (3) @(negedge clk);
    expect_eq(int'(state), int'(FSM_IDLE), "state in reset");
    rst_n = 1;
    repeat (10) @(negedge clk);
    expect_eq(int'(state), int'(FSM_IDLE), "Idle holds with start=1");
    expect_eq(n_rd + n_fft, 0, "no activity while Idle");
    // abort: enter Active, leave it after 20 clocks
    start = 0; @(negedge clk); start = 1;
    expect_eq(int'(state), int'(FSM_ACTIVE), "Idle -> Active on start=0");
    repeat (20) @(negedge clk);
    expect_eq(int'(state), int'(FSM_ACTIVE), "Active holds with start=1");
    start = 0; @(negedge clk); start = 1;
    expect_eq(int'(state), int'(FSM_IDLE), "Active -> Idle on start=0");
    expect_eq(int'(done), 0, "no done after abort");
    repeat (5) @(negedge clk);
    // complete run
    clear_counts();
    start = 0; @(negedge clk); start = 1;
    cycles = 0;
    while (!done && cycles < 20000) begin @(negedge clk); cycles++; end
    expect_eq(int'(done), 1, "done reached");
    expect_eq(n_clr, 1, "clear at run start");
    expect_eq(n_rd, NS * SUBFRAME, "speech reads");
    for (int s = 0; s < NS; s++) expect_eq(rd_sub[s], SUBFRAME, "reads per sub-frame");
    expect_eq(n_pad, NS * (NFFT - SUBFRAME), "zero pads");
    expect_eq(n_fft, NS, "FFT starts");
    expect_eq(n_amp, NS * NBINS, "amplitude reads");
    expect_eq(n_mel, NS, "mel starts");
    expect_eq(n_en, NS, "energy closes");
    expect_eq(n_cep, NS - 1, "cepstrum starts");
    expect_eq(n_delta, 1, "delta starts");
    repeat (5) @(negedge clk);
    expect_eq(int'(done), 1, "done holds with start=1");
    start = 0; @(negedge clk); start = 1;
    expect_eq(int'(state), int'(FSM_IDLE), "Active -> Idle after done");
    expect_eq(int'(done), 0, "done clears in Idle");
    // reset from Active
    start = 0; @(negedge clk); start = 1;
    rst_n = 0; @(negedge clk);
    expect_eq(int'(state), int'(FSM_IDLE), "rst_n -> Idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
