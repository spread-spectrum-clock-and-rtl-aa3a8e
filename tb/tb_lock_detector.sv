// Testbench for lock_detector: after reset N = 2; a Ts count of magnitude
// 64 or more keeps it, below 64 moves to N = 8; at N = 8 the limit is 16;
// then N = 32 stays whatever comes. Both signs are tried, and values
// without ss_valid must be ignored.
module tb_lock_detector;
  import cdr_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic              clk = 0, rst_n = 0;
  logic signed [7:0] ss = 0;
  logic              ss_valid = 0;
  cc_size_t          size;
  int checks = 0, failures = 0;

  lock_detector #(.W(8)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int v, input logic vld, input cc_size_t exp);
    ss = 8'(v); ss_valid = vld;
    @(posedge clk);
    #1;
    ss_valid = 0;
    checks++;
    if (size !== exp) begin
      failures++; $display("FAIL ss=%0d vld=%b size=%0d exp=%0d", v, vld, size, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (size !== CC_N2) begin failures++; $display("FAIL reset size"); end
    rst_n = 1;
    put(80, 1, CC_N2);
    put(-64, 1, CC_N2);
    put(64, 1, CC_N2);
    put(10, 0, CC_N2);      // not valid
    put(-63, 1, CC_N8);
    put(16, 1, CC_N8);
    put(-20, 1, CC_N8);
    put(-15, 1, CC_N32);
    put(120, 1, CC_N32);
    put(-127, 1, CC_N32);
    rst_n = 0; #1; rst_n = 1;
    put(0, 0, CC_N2);
    put(63, 1, CC_N8);
    put(15, 1, CC_N32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
