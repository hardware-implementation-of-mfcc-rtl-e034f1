// tb_speech_ram: writes random samples to every address of a small speech
// RAM, reads them back in a different order and checks the one-clock read
// latency and that reads without re keep the old data.
module tb_speech_ram;
  localparam int DEPTH = 200;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [DEPTH];

  speech_ram #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = 16'($urandom);
      @(negedge clk); we = 1; waddr = 8'(a); wdata = model[a];
    end
    @(negedge clk); we = 0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      @(negedge clk); re = 1; raddr = 8'(a);
      @(negedge clk); re = 0;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d: %h vs %h", a, rdata, model[a]); end
      raddr = 8'((a + 7) % DEPTH);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL hold at %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
