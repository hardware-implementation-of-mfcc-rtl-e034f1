// tb_cepstrum: fills a model of the log power register with random Q6.10
// values (one run with all values equal, one at full scale), runs the DCT
// and checks each C_p against sum_k L_k round(128 cos((k-0.5) p pi/20)) >>> 13
// bit for bit, that a flat log spectrum gives C_p close to 0, the output
// order and the latency of 12 x 20 + 2 clocks.
module tb_cepstrum;
  import mfcc_ref_pkg::*;
  localparam int NF = 20, NC = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, start = 0, done, out_valid;
  logic [4:0] log_raddr;
  logic [15:0] log_rdata;
  logic [3:0] out_idx;
  logic signed [15:0] out_data;
  logic [15:0] lmem [NF];

  always_ff @(posedge clk) log_rdata <= lmem[log_raddr];

  cepstrum dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv;
    int cycles, nout;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      for (int k = 0; k < NF; k++)
        lmem[k] = (run == 0) ? 16'd30000 : (run == 1) ? 16'hffff : 16'($urandom);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 1; nout = 0;
      while (!done || out_valid) begin
        if (out_valid) begin
          expv = 0;
          for (int k = 0; k < NF; k++) expv += longint'(lmem[k]) * ref_dct(nout, k, NF);
          expv = expv >>> 13;
          checks += 2;
          if (int'(out_idx) != nout) begin failures++; $display("FAIL order"); end
          if (64'(out_data) != expv) begin failures++; $display("FAIL run %0d p=%0d: %0d exp %0d", run, nout + 1, out_data, expv); end
          if (run == 0) begin
            checks++;
            if (out_data > 8 || out_data < -8) begin failures++; $display("FAIL flat C%0d = %0d", nout + 1, out_data); end
          end
          nout++;
        end
        if (done) break;
        @(negedge clk); cycles++;
      end
      checks++;
      if (nout != NC || cycles != NC * NF + 2) begin failures++; $display("FAIL outputs %0d cycles %0d", nout, cycles); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
