// tb_cos_rom: reads all 12 x 20 DCT coefficients and compares them with
// round(128 cos((k - 0.5) p pi / 20)) clipped to 127; checks that the exact
// -1.0 at p = 8, k = 3 is -128.
module tb_cos_rom;
  import mfcc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] p = 0;
  logic [4:0] k = 0;
  logic signed [7:0] coef;

  cos_rom dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pi_ = 0; pi_ < 12; pi_++)
      for (int ki = 0; ki < 20; ki++) begin
        @(negedge clk); p = 4'(pi_); k = 5'(ki);
        @(negedge clk);
        checks++;
        if (coef != 8'(ref_dct(pi_, ki, 20))) begin failures++; $display("FAIL p=%0d k=%0d %0d", pi_, ki, coef); end
        if (pi_ == 7 && ki == 2) begin checks++; if (coef != -128) begin failures++; $display("FAIL -1"); end end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
