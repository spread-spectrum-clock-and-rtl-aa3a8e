// Testbench for fec. For a list of accumulator values (the document's
// example 20, both signs, 0, the limits and random values) the lead_f and
// lag_f pulses in each compensation period are counted and must equal |sf|
// on the side given by the sign. The Ts tick period must be 512 cycles,
// pulses must be at least 4 cycles apart, and sf = 64 must give an exactly
// even train, one pulse per 8 cycles.
module tb_fec;
  timeunit 1ps;
  timeprecision 1fs;

  logic              clk = 0, rst_n = 0;
  logic signed [7:0] sf = 0;
  logic              lead_f, lag_f, ts_tick;
  int checks = 0, failures = 0;

  fec #(.TS_CYCLES(512), .MAG_W(7)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vals[$] = '{20, -20, 0, 127, -127, 64, 1, -1, 85, -42};
  int n_lead, n_lag, last_pulse, min_gap, max_gap, cyc, last_tick, idx;
  logic prev_tick;

  initial begin
    for (int i = 0; i < 10; i++) vals.push_back(int'($urandom_range(0, 254)) - 127);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Skip to the first Ts boundary.
    while (!ts_tick) begin @(posedge clk); #1; end
    last_tick = 0; cyc = 0;
    idx = 0;
    prev_tick = 1;
    n_lead = 0; n_lag = 0; last_pulse = -100; min_gap = 1000; max_gap = 0;
    while (idx <= vals.size()) begin
      @(posedge clk); #1;
      cyc++;
      if (lead_f || lag_f) begin
        if (last_pulse >= 0 && cyc - last_pulse < min_gap) min_gap = cyc - last_pulse;
        if (last_pulse >= 0 && cyc - last_pulse > max_gap) max_gap = cyc - last_pulse;
        last_pulse = cyc;
      end
      n_lead += int'(lead_f);
      n_lag  += int'(lag_f);
      if (prev_tick) begin
        // Window of the previous Ts is complete (its last pulse shows now).
        if (idx > 0) begin
          int v;
          v = vals[idx - 1];
          checks++;
          if (n_lead != ((v > 0) ? v : 0) || n_lag != ((v < 0) ? -v : 0)) begin
            failures++; $display("FAIL sf=%0d lead=%0d lag=%0d", v, n_lead, n_lag);
          end
          checks++;
          if (n_lead + n_lag > 1 && min_gap < 4) begin
            failures++; $display("FAIL sf=%0d pulses %0d cycles apart", v, min_gap);
          end
          if (v == 64) begin
            checks++;
            if (min_gap != 8 || max_gap != 8) begin
              failures++; $display("FAIL sf=64 uneven: gaps %0d..%0d", min_gap, max_gap);
            end
          end
        end
        if (idx < vals.size()) sf = 8'(vals[idx]);
        idx++;
        n_lead = 0; n_lag = 0; last_pulse = -100; min_gap = 1000; max_gap = 0;
      end
      if (ts_tick) begin
        if (last_tick != 0) begin
          checks++;
          if (cyc - last_tick != 512) begin
            failures++; $display("FAIL Ts = %0d cycles", cyc - last_tick);
          end
        end
        last_tick = cyc;
      end
      prev_tick = ts_tick;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
