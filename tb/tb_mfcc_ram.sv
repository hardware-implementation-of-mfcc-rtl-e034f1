// tb_mfcc_ram: fills the MFCC RAM with random words and checks both read
// ports, each with its one-clock latency, reading different addresses in
// the same clock.
module tb_mfcc_ram;
  localparam int DEPTH = 3 * 26;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we = 0;
  logic [6:0] waddr = 0, ra = 0, rb = 0;
  logic [15:0] wdata = 0, rda, rdb;
  logic [15:0] model [DEPTH];

  mfcc_ram #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = 16'($urandom);
      @(negedge clk); we = 1; waddr = 7'(a); wdata = model[a];
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      ra = 7'(a); rb = 7'(DEPTH - 1 - a);
      @(negedge clk);
      checks += 2;
      if (rda !== model[a]) begin failures++; $display("FAIL port A %0d", a); end
      if (rdb !== model[DEPTH-1-a]) begin failures++; $display("FAIL port B %0d", DEPTH-1-a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
