// tb_log2_approx: checks log2(N) ~ k + m against a bit-loop reference for
// zero, every power of two, all-ones values and random 46-bit inputs, and
// checks that the approximation is within 0.09 of the true log2.
module tb_log2_approx;
  import mfcc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, in_valid = 0, out_valid;
  logic [45:0] in_data = 0;
  logic [15:0] out_log;

  log2_approx dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(longint x);
    real err;
    @(negedge clk); in_valid = 1; in_data = 46'(x);
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid || 64'(out_log) != ref_log2(x)) begin
      failures++; $display("FAIL %0d -> %h exp %h", x, out_log, ref_log2(x));
    end
    if (x > 0) begin
      err = $ln(real'(x)) / $ln(2.0) - real'(out_log) / 1024.0;
      checks++;
      if (err < -0.001 || err > 0.09) begin failures++; $display("FAIL accuracy %0d err %f", x, err); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(0);
    for (int i = 0; i < 46; i++) begin one(64'sd1 <<< i); one((64'sd1 <<< (i + 1)) - 1); end
    for (int i = 0; i < 300; i++) one(longint'({$urandom, $urandom} & 64'h3fff_ffff_ffff) >>> ($urandom % 46));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
