// tb_mel_filter: drives the mel filter bank from a model of the amplitude
// register and of the SF' register for four sub-frames of random
// amplitudes (one flat) and checks
//  - each S'_k = SF_k + SF_k(previous sub-frame) against a reference
//    built from the mel-scale formula (bit for bit),
//  - that the flat spectrum gives filters that grow with k (wider triangles),
//  - the order of the outputs and that done follows in at most
//    NBINS + NFILT + 4 clocks.
module tb_mel_filter;
  import mfcc_ref_pkg::*;
  localparam int NF = 20, NB = 65;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, start = 0, done;
  logic [6:0]  amp_raddr;
  logic [40:0] amp_rdata;
  logic [4:0]  prv_raddr, prv_waddr, out_idx;
  logic [44:0] prv_rdata, prv_wdata;
  logic        prv_we, out_valid;
  logic [45:0] out_data;

  logic [40:0] amp_mem [NB];
  logic [44:0] prv_mem [NF];

  always_ff @(posedge clk) begin
    amp_rdata <= amp_mem[amp_raddr];
    prv_rdata <= prv_mem[prv_raddr];
    if (prv_we) prv_mem[prv_waddr] <= prv_wdata;
  end

  mel_filter dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sf [NF + 2], prev [NF + 2];
    longint got [NF];
    int up, w, cycles, nout;
    for (int k = 0; k < NF + 2; k++) prev[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NF; k++) prv_mem[k] = '0;
    for (int sfi = 0; sfi < 4; sfi++) begin
      for (int k = 0; k < NF + 2; k++) sf[k] = 0;
      for (int l = 0; l < NB; l++) begin
        amp_mem[l] = (sfi == 1) ? 41'(1 << 20) : 41'({$urandom, $urandom} >> (34 + $urandom % 6));
        ref_mel(l, NF, 128, up, w);
        sf[up]     += (longint'(amp_mem[l]) * w) >>> 7;
        sf[up - 1] += (longint'(amp_mem[l]) * (128 - w)) >>> 7;
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 1; nout = 0;
      while (!done) begin
        if (out_valid) begin
          checks++;
          if (int'(out_idx) != nout) begin failures++; $display("FAIL order %0d", out_idx); end
          got[nout] = longint'(out_data);
          checks++;
          if (64'(out_data) != sf[nout + 1] + prev[nout + 1]) begin
            failures++; $display("FAIL sub-frame %0d filter %0d: %0d exp %0d", sfi, nout + 1, out_data, sf[nout + 1] + prev[nout + 1]);
          end
          nout++;
        end
        @(negedge clk); cycles++;
      end
      checks++;
      if (nout != NF || cycles > NB + NF + 4) begin failures++; $display("FAIL outputs %0d cycles %0d", nout, cycles); end
      if (sfi == 1) begin
        checks++;
        if (!(sf[NF] > sf[1] && sf[NF] > sf[NF / 2])) begin failures++; $display("FAIL flat spectrum shape"); end
      end
      prev = sf;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
