// tb_energy: feeds 30 sub-frames of 80 random samples of varying loudness
// (one all at full scale, one silent) and checks each reported energy
// against the sum of squares of that sub-frame and the one before it. Before
// sub-frames 4 and 20 it pulses clr and checks that the history is forgotten.
module tb_energy;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, clr = 0, in_valid = 0, finish = 0, out_valid;
  logic signed [15:0] in_data = 0;
  logic [38:0] out_energy;

  energy dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint prev = 0, cur;
    int s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int sf = 0; sf < 30; sf++) begin
      if (sf == 4 || sf == 20) begin @(negedge clk); clr = 1; @(negedge clk); clr = 0; prev = 0; end
      cur = 0;
      for (int l = 0; l < 80; l++) begin
        s = (sf == 2) ? -32768 : (sf == 7) ? 0 : int'($signed(16'($urandom))) >>> (sf % 9);
        cur += longint'(s) * s;
        @(negedge clk); in_valid = 1; in_data = 16'(s);
      end
      @(negedge clk); in_valid = 0; finish = 1;
      @(negedge clk); finish = 0;
      checks++;
      if (!out_valid || 64'(out_energy) != cur + prev) begin
        failures++; $display("FAIL sub-frame %0d: %0d exp %0d", sf, out_energy, cur + prev);
      end
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
