// Testbench for ser2to1: random pairs are applied each cycle; in the next
// cycle the high half must carry the first bit and the low half the second.
module tb_ser2to1;
  timeunit 1ps;
  timeprecision 1fs;

  logic       clk = 0, rst_n = 0;
  logic [1:0] d2 = 0;
  logic       dout;
  int checks = 0, failures = 0;

  ser2to1 dut (.*);

  always #100 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] prev;
    #150 rst_n = 1;
    @(negedge clk);
    prev = 2'b00;
    for (int i = 0; i < 300; i++) begin
      d2 = 2'($urandom);
      @(posedge clk); #50;
      checks++;
      if (dout !== d2[1]) begin failures++; $display("FAIL first bit"); end
      @(negedge clk); #50;
      checks++;
      if (dout !== d2[0]) begin failures++; $display("FAIL second bit"); end
      prev = d2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
