// Testbench for clk_src_mux: random phase words on both inputs, output must
// follow the selected one.
module tb_clk_src_mux;
  timeunit 1ps;
  timeprecision 1fs;

  logic [7:0] ph_pll, ph_gen, ph;
  logic       sel;
  int checks = 0, failures = 0;

  clk_src_mux dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      ph_pll = 8'($urandom); ph_gen = 8'($urandom); sel = 1'(i % 2);
      #10;
      checks++;
      if (ph !== (sel ? ph_gen : ph_pll)) begin
        failures++; $display("FAIL sel=%b ph=%h", sel, ph);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
