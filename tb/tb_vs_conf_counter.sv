// Testbench for vs_conf_counter. A reference model keeps an integer sum
// that restarts at zero after each decision and fires lead at >= +N and lag
// at <= -(N+1) (N = 2, 8, 32). Random inputs -2..+2 with a bias are run at
// every size, and a directed part checks the asymmetric thresholds: a lead
// after exactly N/2 inputs of +2, a lag after N+1 inputs of -1.
module tb_vs_conf_counter;
  import cdr_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic              clk = 0, rst_n = 0;
  logic signed [2:0] pd_val = 0;
  cc_size_t          size = CC_N2;
  logic              lead_p, lag_p;
  logic [5:0]        acc;
  int checks = 0, failures = 0;
  int ref_sum = 0, nval = 2;
  int n_lead = 0, n_lag = 0;
  logic exp_lead = 0, exp_lag = 0;

  vs_conf_counter #(.W(6)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nof(cc_size_t s);
    return (s == CC_N2) ? 2 : (s == CC_N8) ? 8 : 32;
  endfunction

  // Drive one input for one cycle and check the registered outputs.
  task automatic step(input int v);
    pd_val = 3'(v);
    @(posedge clk);
    // model
    ref_sum += v;
    exp_lead = 0; exp_lag = 0;
    if (ref_sum >= nof(size)) begin exp_lead = 1; ref_sum = 0; end
    else if (ref_sum <= -(nof(size) + 1)) begin exp_lag = 1; ref_sum = 0; end
    #1;
    checks++;
    if (lead_p !== exp_lead || lag_p !== exp_lag) begin
      failures++;
      $display("FAIL N=%0d v=%0d lead=%b/%b lag=%b/%b", nof(size), v, lead_p, exp_lead, lag_p, exp_lag);
    end
    if (lead_p) n_lead++;
    if (lag_p) n_lag++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int sz = 0; sz < 3; sz++) begin
      size = cc_size_t'(sz);
      // Directed: N/2 inputs of +2 -> lead on the last one only.
      for (int i = 0; i < nof(size) / 2; i++) step(2);
      // N+1 inputs of -1 -> lag on the last one only.
      for (int i = 0; i < nof(size) + 1; i++) step(-1);
      // Random, biased to each side in turn.
      for (int i = 0; i < 3000; i++) begin
        int r;
        r = int'($urandom_range(0, 4)) - 2;
        if (i < 1500 && r == -2) r = 1;
        if (i >= 1500 && r == 2) r = -1;
        step(r);
      end
    end
    checks++;
    if (n_lead < 10 || n_lag < 10) begin
      failures++;
      $display("FAIL too few decisions lead=%0d lag=%0d", n_lead, n_lag);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
