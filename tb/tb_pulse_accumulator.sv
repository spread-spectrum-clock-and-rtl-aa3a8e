// Testbench for pulse_accumulator: random ss values added on ss_valid,
// compared with an integer sum clamped to +/-127; includes runs into both
// limits and idle cycles where sf must hold.
module tb_pulse_accumulator;
  timeunit 1ps;
  timeprecision 1fs;

  logic              clk = 0, rst_n = 0;
  logic signed [7:0] ss = 0;
  logic              ss_valid = 0;
  logic signed [7:0] sf;
  int checks = 0, failures = 0;
  int ref_sf = 0, n_sat = 0;

  pulse_accumulator #(.W(8)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int v, input logic vld);
    ss = 8'(v); ss_valid = vld;
    @(posedge clk);
    if (vld) begin
      ref_sf += v;
      if (ref_sf > 127)  begin ref_sf = 127;  n_sat++; end
      if (ref_sf < -127) begin ref_sf = -127; n_sat++; end
    end
    #1;
    checks++;
    if (int'(sf) != ref_sf) begin
      failures++; $display("FAIL ss=%0d vld=%b sf=%0d exp=%0d", v, vld, sf, ref_sf);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    put(20, 1); put(50, 0); put(-5, 1);
    for (int i = 0; i < 6; i++) put(100, 1);     // to +127
    for (int i = 0; i < 6; i++) put(-127, 1);    // to -127
    put(-128, 1);
    for (int i = 0; i < 3000; i++) put(int'($urandom_range(0, 80)) - 40, 1'($urandom));
    checks++;
    if (n_sat < 4) begin failures++; $display("FAIL no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
