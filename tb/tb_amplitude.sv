// tb_amplitude: random and extreme complex inputs; checks
// max(|I|,|Q|) + floor(min(|I|,|Q|)/4) and the one-clock latency.
module tb_amplitude;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, in_valid = 0, out_valid;
  logic signed [39:0] in_re = 0, in_im = 0;
  logic [40:0] out_mag;

  amplitude dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a, b, x, y, expv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      if (i == 0) begin a = -(64'sd1 <<< 39); b = (64'sd1 <<< 39) - 1; end
      else begin
        a = longint'($signed(40'({$urandom, $urandom}))) >>> ($urandom % 30);
        b = longint'($signed(40'({$urandom, $urandom}))) >>> ($urandom % 30);
      end
      @(negedge clk); in_valid = 1; in_re = 40'(a); in_im = 40'(b);
      @(negedge clk); in_valid = 0;
      x = a < 0 ? -a : a;
      y = b < 0 ? -b : b;
      expv = (x >= y) ? x + y / 4 : y + x / 4;
      checks++;
      if (!out_valid || out_mag != 41'(expv)) begin failures++; $display("FAIL %0d %0d -> %0d exp %0d", a, b, out_mag, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
