// tb_delta: a model of the MFCC RAM holds 7 frames of random static
// coefficients (some at full scale to force saturation); the delta unit
// is run and every written delta is checked against
// 2(c[n+2]-c[n-2]) + (c[n+1]-c[n-1]) with clamped frame indices and 16-bit
// saturation. Also checks that static words are untouched and the latency
// of 6 clocks per coefficient (plus one for done).
module tb_delta;
  localparam int NFR = 7, FW = 26, NC = 13;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, start = 0, done, we;
  logic [7:0] raddr, waddr;
  logic signed [15:0] rdata, wdata;
  logic signed [15:0] mem [NFR * FW];
  logic signed [15:0] init [NFR * FW];

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

  delta #(.NFRAMES(NFR), .ADDR_W(8)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int c(int n, int i);
    int f = n < 0 ? 0 : n > NFR - 1 ? NFR - 1 : n;
    return int'(init[f * FW + i]);
  endfunction

  initial begin
    int cycles, d, nsat;
    nsat = 0;
    for (int a = 0; a < NFR * FW; a++) begin
      mem[a] = 16'($urandom);
      if (a % FW == 3) mem[a] = (a / FW) < 3 ? -16'sd32768 : 16'sd32767;
      if (a % FW == 4) mem[a] = (a / FW) < 3 ? 16'sd32767 : -16'sd32768;
      init[a] = mem[a];
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != NFR * NC * 6 + 1) begin failures++; $display("FAIL cycles %0d", cycles); end
    for (int n = 0; n < NFR; n++)
      for (int i = 0; i < FW; i++) begin
        checks++;
        if (i < NC) begin
          if (mem[n * FW + i] != init[n * FW + i]) begin failures++; $display("FAIL static overwritten %0d %0d", n, i); end
        end else begin
          d = 2 * (c(n + 2, i - NC) - c(n - 2, i - NC)) + (c(n + 1, i - NC) - c(n - 1, i - NC));
          if (d > 32767) begin d = 32767; nsat++; end
          if (d < -32768) begin d = -32768; nsat++; end
          if (int'(mem[n * FW + i]) != d) begin failures++; $display("FAIL delta n=%0d i=%0d %0d exp %0d", n, i - NC, mem[n * FW + i], d); end
        end
      end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
