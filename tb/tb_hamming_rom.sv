// tb_hamming_rom: reads all 80 coefficients and compares them with
// round(16 (0.54 - 0.46 cos(2 pi l / 79))); also checks symmetry and the
// range 1..16.
module tb_hamming_rom;
  import mfcc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0] addr = 0;
  logic [4:0] coef;
  int got [80];

  hamming_rom dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 80; l++) begin
      @(negedge clk); addr = 7'(l);
      @(negedge clk); got[l] = int'(coef);
      checks++;
      if (got[l] != ref_ham(l, 80)) begin failures++; $display("FAIL l=%0d %0d vs %0d", l, got[l], ref_ham(l, 80)); end
      checks++;
      if (got[l] < 1 || got[l] > 16) begin failures++; $display("FAIL range l=%0d", l); end
    end
    for (int l = 0; l < 40; l++) begin
      checks++;
      if (got[l] != got[79-l]) begin failures++; $display("FAIL symmetry %0d", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
