// Testbench for pulse_counter: random lead_p/lag_p with a Ts tick every 512
// cycles; each reported ss must equal the net count of that period (with
// saturation at +/-127, reached by a period of only leads).
module tb_pulse_counter;
  timeunit 1ps;
  timeprecision 1fs;

  logic              clk = 0, rst_n = 0;
  logic              lead_p = 0, lag_p = 0, ts_tick = 0;
  logic signed [7:0] ss;
  logic              ss_valid;
  int checks = 0, failures = 0;
  int cnt = 0, exp_ss = 0, n_valid = 0;

  pulse_counter #(.W(8)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int per = 0; per < 8; per++) begin
      for (int c = 0; c < 512; c++) begin
        case (per)
          2: begin lead_p = 1; lag_p = 0; end              // saturate high
          3: begin lead_p = 0; lag_p = 1; end              // saturate low
          default: begin
            lead_p = ($urandom_range(0, 99) < 20 + 5 * per);
            lag_p  = ($urandom_range(0, 99) < 25);
          end
        endcase
        ts_tick = (c == 511);
        @(posedge clk);
        if (lead_p && !lag_p && cnt < 127) cnt++;
        if (lag_p && !lead_p && cnt > -127) cnt--;
        if (ts_tick) begin exp_ss = cnt; cnt = 0; end
        #1;
        if (ss_valid) begin
          n_valid++;
          checks++;
          if (int'(ss) != exp_ss) begin
            failures++; $display("FAIL period %0d ss=%0d exp=%0d", per, ss, exp_ss);
          end
        end
      end
    end
    lead_p = 0; lag_p = 0; ts_tick = 0;
    @(posedge clk); #1;
    if (ss_valid) n_valid++;
    checks++;
    if (n_valid != 8) begin failures++; $display("FAIL %0d strobes", n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
