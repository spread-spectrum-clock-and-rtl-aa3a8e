// Testbench for cla_adder: exhaustive at 6 bits (with both carry-ins) and
// random at 8 bits, against integer addition.
module tb_cla_adder;
  timeunit 1ps;
  timeprecision 1fs;

  logic [5:0] a6, b6, s6;
  logic [7:0] a8, b8, s8;
  logic       ci6, co6, ci8, co8;
  int checks = 0, failures = 0;

  cla_adder #(.W(6)) dut6 (.a(a6), .b(b6), .cin(ci6), .s(s6), .cout(co6));
  cla_adder #(.W(8)) dut8 (.a(a8), .b(b8), .cin(ci8), .s(s8), .cout(co8));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        for (int c = 0; c < 2; c++) begin
          a6 = 6'(i); b6 = 6'(j); ci6 = 1'(c);
          #1;
          exp = i + j + c;
          checks++;
          if ({co6, s6} !== 7'(exp)) begin
            failures++;
            $display("FAIL6 %0d+%0d+%0d -> %0d", i, j, c, {co6, s6});
          end
        end
    for (int n = 0; n < 2000; n++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); ci8 = 1'($urandom);
      #1;
      exp = int'(a8) + int'(b8) + int'(ci8);
      checks++;
      if ({co8, s8} !== 9'(exp)) begin
        failures++;
        $display("FAIL8 %0d+%0d+%0d -> %0d", a8, b8, ci8, {co8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
