// tb_windowing: multiplies random and extreme 17-bit samples by random and
// extreme 5-bit coefficients (0..16) and checks the 21-bit product and the
// one-clock latency.
module tb_windowing;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0, out_valid;
  logic signed [16:0] in_data = 0;
  logic [4:0] coef = 0;
  logic signed [20:0] out_data;

  windowing dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      x = (i == 0) ? -65536 : (i == 1) ? 65535 : int'($signed(17'($urandom)));
      c = (i < 2) ? 16 : int'($urandom % 17);
      @(negedge clk);
      in_valid = 1; in_data = 17'(x); coef = 5'(c);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_data != 21'(x * c)) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", x, c, out_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
