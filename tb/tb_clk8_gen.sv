// Testbench for clk8_gen: a 6 GHz clock in; every output must have a
// 666.667 ps period and ph[i] must rise i*83.333 ps after ph[0].
module tb_clk8_gen;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime T6 = 166.6667;

  logic       clk6g = 0, rst_n = 0;
  logic [7:0] ph;
  int checks = 0, failures = 0;
  realtime last_rise [8];
  realtime t0;

  clk8_gen dut (.*);

  always #(T6 / 2.0) clk6g = !clk6g;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < 8; i++) begin : g_mon
    always @(posedge ph[i]) begin
      realtime now, off;
      now = $realtime;
      if (rst_n && $realtime > 2000.0) begin
        checks++;
        if (now - last_rise[i] - 4.0 * T6 > 0.01 || now - last_rise[i] - 4.0 * T6 < -0.01) begin
          failures++; $display("FAIL ph[%0d] period %f", i, now - last_rise[i]);
        end
        off = now - t0 - real'(i) * T6 / 2.0;
        while (off > 2.0 * T6)  off -= 4.0 * T6;
        while (off < -2.0 * T6) off += 4.0 * T6;
        checks++;
        if (off > 0.01 || off < -0.01) begin
          failures++; $display("FAIL ph[%0d] phase error %f", i, off);
        end
      end
      if (i == 0) t0 = now;
      last_rise[i] = now;
    end
  end

  initial begin
    #(3.3 * T6) rst_n = 1;
    #(200.0 * T6);
    checks++;
    if (checks < 300) begin failures++; $display("FAIL only %0d edges seen", checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
