// Testbench for prbs_gen: the serialized output must obey b[n] = b[n-6] ^
// b[n-7], repeat with period 127 and contain 64 ones per period.
module tb_prbs_gen;
  timeunit 1ps;
  timeprecision 1fs;

  logic       clk = 0, rst_n = 0;
  logic [1:0] q2;
  int checks = 0, failures = 0;
  logic b [0:599];

  prbs_gen dut (.*);

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    #12 rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #1;
      b[2 * i] = q2[1]; b[2 * i + 1] = q2[0];
    end
    for (int n = 7; n < 600; n++) begin
      checks++;
      if (b[n] !== (b[n - 6] ^ b[n - 7])) begin failures++; $display("FAIL recurrence at %0d", n); end
    end
    for (int n = 0; n < 600 - 127; n++) begin
      checks++;
      if (b[n] !== b[n + 127]) begin failures++; $display("FAIL period at %0d", n); end
    end
    ones = 0;
    for (int n = 0; n < 127; n++) ones += int'(b[n]);
    checks++;
    if (ones != 64) begin failures++; $display("FAIL ones=%0d", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
