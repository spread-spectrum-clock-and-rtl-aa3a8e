// Testbench for hrpd. Ideal 4-phase 1.5 GHz clocks sample a random 3 Gb/s
// stream whose bit boundaries sit delta ps after the P0/P2 edges. With the
// data early (delta < 0) every transition must give Lead, with it late
// (delta > 0) Lag, and no transition neither. The recovered pair must equal
// the sent bits two cycles after the P0 edge that opened them.
module tb_hrpd;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime T  = 666.667;
  localparam realtime UI = T / 2.0;

  logic [3:0] clk4 = 4'b1100;
  logic       rst_n = 0, din = 0;
  logic [3:0] pd;
  logic [1:0] rdata;
  int checks = 0, failures = 0;
  int n_lead = 0, n_lag = 0;

  logic    bits [0:4095];
  realtime bdel [0:4095];
  realtime delta = -40.0;

  hrpd dut (.*);

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Clocks: P0 rises at T*(m+1).
  initial begin
    #(T);
    forever begin
      clk4[0] = 1; clk4[2] = 0; #(T / 4.0);
      clk4[1] = 1; clk4[3] = 0; #(T / 4.0);
      clk4[0] = 0; clk4[2] = 1; #(T / 4.0);
      clk4[1] = 0; clk4[3] = 1; #(T / 4.0);
    end
  end

  // Data: bit k starts at T + delta + k*UI.
  initial begin
    for (int k = 0; k < 4096; k++) bits[k] = 1'($urandom);
    for (int k = 0; k < 4096; k++) begin
      realtime t;
      bdel[k] = delta;
      t = T + delta + real'(k) * UI;
      if (t > $realtime) #(t - $realtime);
      din = bits[k];
    end
  end

  initial begin
    int m;
    logic tr1, tr2, e_lead1, e_lag1, e_lead2, e_lag2;
    #(T / 2.0) rst_n = 1;
    m = 0;
    forever begin
      @(posedge clk4[0]);
      #1;
      // After P0 edge m the outputs describe the cycle opened at edge m-2.
      if (m >= 4 && m < 2000) begin
        int n;
        n = m - 2;
        checks++;
        if (rdata !== {bits[2 * n], bits[2 * n + 1]}) begin
          failures++; $display("FAIL data m=%0d %b exp %b%b", m, rdata, bits[2 * n], bits[2 * n + 1]);
        end
        tr1 = bits[2 * n - 1] != bits[2 * n];
        tr2 = bits[2 * n] != bits[2 * n + 1];
        e_lead1 = tr1 && bdel[2 * n] < 0.0;
        e_lag1  = tr1 && bdel[2 * n] > 0.0;
        e_lead2 = tr2 && bdel[2 * n + 1] < 0.0;
        e_lag2  = tr2 && bdel[2 * n + 1] > 0.0;
        checks++;
        if (pd !== {e_lead1, e_lead2, e_lag1, e_lag2}) begin
          failures++; $display("FAIL pd m=%0d %b exp %b", m, pd, {e_lead1, e_lead2, e_lag1, e_lag2});
        end
        n_lead += int'(pd[3]) + int'(pd[2]);
        n_lag  += int'(pd[1]) + int'(pd[0]);
      end
      if (m == 1000) delta = 50.0;
      m++;
      if (m == 2000) begin
        checks++;
        if (n_lead < 100 || n_lag < 100) begin
          failures++; $display("FAIL lead=%0d lag=%0d", n_lead, n_lag);
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
