// tb_lfsr16: checks that the 16-bit LFSR is maximal: starting from its
// seed it visits every one of the 65535 non-zero values exactly once before
// returning to the seed, never shows zero, and holds when step is low.
module tb_lfsr16;
  logic clk = 0, rst_n = 0, step = 0;
  logic [15:0] rnd, first;
  bit seen [65536];
  int checks = 0, failures = 0, dup = 0, zero = 0;

  lfsr16 dut (.clk(clk), .rst_n(rst_n), .step(step), .rnd(rnd));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    first = rnd;
    checks++;
    if (rnd != 16'hACE1) begin failures++; $display("seed %h", rnd); end
    // hold
    repeat (3) @(negedge clk);
    checks++;
    if (rnd != first) begin failures++; $display("moved without step"); end
    step = 1;
    for (int i = 0; i < 65535; i++) begin
      if (rnd == 0) zero++;
      if (seen[rnd]) dup++;
      seen[rnd] = 1;
      @(negedge clk);
    end
    checks++;
    if (zero != 0) begin failures++; $display("zero state seen"); end
    checks++;
    if (dup != 0) begin failures++; $display("%0d repeated states in one period", dup); end
    checks++;
    if (rnd != first) begin failures++; $display("period is not 65535"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
