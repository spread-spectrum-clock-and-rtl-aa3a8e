// Testbench for pd_encoder: all 16 input codes against the encoder truth
// table, written out here as an independent list of expected A2..A0.
module tb_pd_encoder;
  timeunit 1ps;
  timeprecision 1fs;

  logic [3:0]        s;
  logic signed [2:0] a;
  int checks = 0, failures = 0;

  pd_encoder dut (.s(s), .a(a));

  // Expected outputs for s = 0..15 (S3 S2 S1 S0 = Lead1 Lead2 Lag1 Lag2).
  localparam logic [2:0] EXP [16] = '{
    3'b000, 3'b111, 3'b111, 3'b110, 3'b001, 3'b000, 3'b000, 3'b111,
    3'b001, 3'b000, 3'b000, 3'b111, 3'b010, 3'b001, 3'b001, 3'b000};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      s = 4'(i);
      #10;
      checks++;
      if (a !== EXP[i]) begin
        failures++;
        $display("FAIL s=%b a=%b exp=%b", s, a, EXP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
