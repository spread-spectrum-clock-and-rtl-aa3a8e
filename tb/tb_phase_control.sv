// Testbench for phase_control. An integer reference position (mod 32) is
// moved by the sign of (lag_p + lag_f - lead_p - lead_f). Every cycle the
// outputs are decoded independently (even phase from ca, odd phase from cb,
// number of ones in d) and checked against it; ca/cb must stay one-hot and
// neighbours, d must be a thermometer code, and a coarse selector may only
// change when d was 0000 or 1111. The run goes several full turns each way.
module tb_phase_control;
  timeunit 1ps;
  timeprecision 1fs;

  logic       clk = 0, rst_n = 0;
  logic       lead_p = 0, lag_p = 0, lead_f = 0, lag_f = 0;
  logic [3:0] ca, cb, d;
  logic [4:0] pos;
  int checks = 0, failures = 0;
  int ref_pos = 0, n_coarse = 0, n_wrap = 0;

  phase_control dut (.*);

  always #5 clk = !clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int decode(logic [3:0] a, logic [3:0] b, logic [3:0] f);
    int ea, ob, k;
    ea = -1; ob = -1;
    for (int i = 0; i < 4; i++) begin
      if (a[i]) ea = 2 * i;
      if (b[i]) ob = 2 * i + 1;
    end
    k = $countones(f);
    // Interpolated phase in quarter-phase steps, taken along the short way.
    if ((ob - ea + 8) % 8 == 1) return (4 * ea + k) % 32;
    else                        return (4 * ea - k + 32) % 32;
  endfunction

  task automatic check_state(input logic [3:0] ca_old, input logic [3:0] cb_old, input logic [3:0] d_old);
    int ea, ob;
    checks++;
    if (!$onehot(ca) || !$onehot(cb)) begin
      failures++; $display("FAIL not one-hot ca=%b cb=%b", ca, cb); return;
    end
    ea = 0; ob = 1;
    for (int i = 0; i < 4; i++) begin
      if (ca[i]) ea = 2 * i;
      if (cb[i]) ob = 2 * i + 1;
    end
    checks++;
    if (((ob - ea + 8) % 8 != 1) && ((ea - ob + 8) % 8 != 1)) begin
      failures++; $display("FAIL not neighbours ca=%b cb=%b", ca, cb);
    end
    checks++;
    if (!(d inside {4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1111})) begin
      failures++; $display("FAIL d not thermometer %b", d);
    end
    checks++;
    if (decode(ca, cb, d) != ref_pos || int'(pos) != ref_pos) begin
      failures++; $display("FAIL pos dec=%0d out=%0d ref=%0d", decode(ca, cb, d), pos, ref_pos);
    end
    if (ca != ca_old || cb != cb_old) begin
      n_coarse++;
      checks++;
      if (!(d_old inside {4'b0000, 4'b1111})) begin
        failures++; $display("FAIL coarse change with d=%b", d_old);
      end
    end
  endtask

  task automatic cyc(input logic lp, input logic gp, input logic lf, input logic gf);
    logic [3:0] ca_o, cb_o, d_o;
    int net, old;
    ca_o = ca; cb_o = cb; d_o = d;
    lead_p = lp; lag_p = gp; lead_f = lf; lag_f = gf;
    @(posedge clk);
    #1;
    net = int'(gp) + int'(gf) - int'(lp) - int'(lf);
    old = ref_pos;
    if (net > 0) ref_pos = (ref_pos + 1) % 32;
    if (net < 0) ref_pos = (ref_pos + 31) % 32;
    if ((old == 31 && ref_pos == 0) || (old == 0 && ref_pos == 31)) n_wrap++;
    check_state(ca_o, cb_o, d_o);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (ca !== 4'b0001 || cb !== 4'b0001 || d !== 4'b0000) begin
      failures++; $display("FAIL reset state");
    end
    rst_n = 1;
    for (int i = 0; i < 100; i++) cyc(0, 1, 0, 0);      // later, 3 turns
    for (int i = 0; i < 100; i++) cyc(1, 0, 0, 0);      // back
    for (int i = 0; i < 100; i++) cyc(0, 0, 1, 0);      // earlier via FEC
    for (int i = 0; i < 50; i++)  cyc(0, 0, 0, 1);
    cyc(1, 0, 0, 1); cyc(1, 1, 0, 0); cyc(1, 1, 1, 0); cyc(0, 1, 0, 1);
    for (int i = 0; i < 4000; i++)
      cyc(1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom));
    checks++;
    if (n_coarse < 20 || n_wrap < 4) begin
      failures++; $display("FAIL coverage coarse=%0d wrap=%0d", n_coarse, n_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
