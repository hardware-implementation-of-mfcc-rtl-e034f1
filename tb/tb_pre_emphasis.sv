// tb_pre_emphasis: streams random and extreme 16-bit samples, with gaps in
// in_valid and one clr, and compares every output with
// floor(s_i - 0.96875 s_(i-1)) computed in floating point, including the
// one-clock latency.
module tb_pre_emphasis;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, clr = 0, in_valid = 0, out_valid;
  logic signed [15:0] in_data = 0;
  logic signed [16:0] out_data;

  pre_emphasis dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev = 0, s, expv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      clr = (i == 300);
      if (clr) begin in_valid = 0; prev = 0; continue; end
      in_valid = ($urandom % 4) != 0;
      if (i < 6) s = (i % 2) ? 32767 : -32768;
      else s = int'($signed(16'($urandom)));
      in_data = 16'(s);
      if (in_valid) begin
        expv = $rtoi($floor(real'(s) - 0.96875 * real'(prev)));
        prev = s;
        @(negedge clk);
        checks++;
        if (!out_valid || out_data != 17'(expv)) begin
          failures++;
          $display("FAIL i=%0d s=%0d got %0d exp %0d", i, s, out_data, expv);
        end
        in_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
