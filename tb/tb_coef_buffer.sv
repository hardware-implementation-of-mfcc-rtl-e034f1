// tb_coef_buffer: writes random 41-bit words into a 65-entry register file
// (the amplitude register size), overwrites some of them and reads all back
// with the one-clock read latency.
module tb_coef_buffer;
  localparam int DW = 41, DEPTH = 65;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          we = 0;
  logic [6:0]    waddr = 0, raddr = 0;
  logic [DW-1:0] wdata = 0, rdata;
  logic [DW-1:0] model [DEPTH];

  coef_buffer #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++)
      for (int a = pass; a < DEPTH; a += pass + 1) begin
        model[a] = {$urandom, $urandom};
        @(negedge clk); we = 1; waddr = 7'(a); wdata = model[a];
      end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 7'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL %0d: %h vs %h", a, rdata, model[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
