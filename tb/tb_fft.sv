// tb_fft: loads sub-frames (an impulse, a constant and three random
// windowed-size sub-frames, each zero-padded to 128 points, loaded in a
// shuffled order), runs the transform and checks
//  - every bin bit for bit against a separate fixed-point FFT model,
//  - every bin against a floating-point DFT within 3% of the input's L1 norm,
//  - the latency: done 7 x 64 + 1 clocks after start.
module tb_fft;
  import mfcc_ref_pkg::*;
  localparam int N = 128;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, ld_en = 0, start = 0, busy, done;
  logic [6:0] ld_addr = 0, rd_addr = 0;
  logic signed [20:0] ld_data = 0;
  logic signed [39:0] rd_re, rd_im;

  fft dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic run(int kind);
    longint re[] = new[N];
    longint im[] = new[N];
    int x[N], order[N], cycles;
    real l1, dr, di, tol;
    for (int i = 0; i < N; i++) begin
      unique case (kind)
        0: x[i] = (i == 0) ? 1000000 : 0;
        1: x[i] = (i < 80) ? -1048575 : 0;
        default: x[i] = (i < 80) ? int'($signed(21'($urandom))) : 0;
      endcase
      re[i] = x[i]; im[i] = 0; order[i] = i;
    end
    order.shuffle();
    for (int i = 0; i < N; i++) begin
      @(negedge clk); ld_en = 1; ld_addr = 7'(order[i]); ld_data = 21'(x[order[i]]);
    end
    @(negedge clk); ld_en = 0; start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 7 * 64 + 1) begin failures++; $display("FAIL latency %0d", cycles); end
    ref_fft(N, re, im);
    l1 = 0.0;
    for (int i = 0; i < N; i++) l1 += (x[i] < 0) ? -real'(x[i]) : real'(x[i]);
    tol = 0.03 * l1 + 2.0;
    for (int k = 0; k < N; k++) begin
      rd_addr = 7'(k);
      #1;
      checks++;
      if (64'(rd_re) != re[k] || 64'(rd_im) != im[k]) begin
        failures++; $display("FAIL kind %0d bin %0d: %0d %0d vs %0d %0d", kind, k, rd_re, rd_im, re[k], im[k]);
      end
      dr = 0.0; di = 0.0;
      for (int n = 0; n < N; n++) begin
        dr += x[n] * $cos(2.0 * PI_R * k * n / N);
        di -= x[n] * $sin(2.0 * PI_R * k * n / N);
      end
      checks++;
      if (absr(real'(rd_re) - dr) > tol || absr(real'(rd_im) - di) > tol) begin
        failures++; $display("FAIL dft kind %0d bin %0d: %0d %0d vs %f %f", kind, k, rd_re, rd_im, dr, di);
      end
      if (kind == 0) begin
        checks++;
        if (rd_re != 1000000 || rd_im != 0) begin failures++; $display("FAIL impulse bin %0d", k); end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int kind = 0; kind < 5; kind++) run(kind);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
