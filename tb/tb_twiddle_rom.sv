// tb_twiddle_rom: reads all 64 twiddle factors and compares them with
// round(64 cos(2 pi k/128)) and -round(64 sin(2 pi k/128)); checks the
// exact values at k = 0 and k = 32.
module tb_twiddle_rom;
  import mfcc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] addr = 0;
  logic signed [7:0] w_re, w_im;

  twiddle_rom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      addr = 6'(k);
      #1;
      checks += 2;
      if (w_re != 8'(ref_tw_re(k, 128))) begin failures++; $display("FAIL re k=%0d %0d", k, w_re); end
      if (w_im != 8'(ref_tw_im(k, 128))) begin failures++; $display("FAIL im k=%0d %0d", k, w_im); end
      if (k == 0)  begin checks++; if (w_re != 64 || w_im != 0) failures++; end
      if (k == 32) begin checks++; if (w_re != 0 || w_im != -64) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
