// End-to-end testbench of ssc_cdr_top at its default sizes.
//
// A behavioural 8-phase 1.5 GHz PLL drives ph_pll and a 6 GHz clock drives
// the test clock generator. Three runs, each after a reset:
//   A  clk_sel = 1 (generator clock), the on-chip PRBS7 stream looped back
//      to din, no frequency offset: the CDR must lock, walk N 2 -> 8 -> 32
//      and recover the PRBS with no error.
//   B  a PRBS7 source 5000 ppm faster than the clock (up to +5000 ppm is in
//      the stated tolerance): the first Ts sees about +82 net lead steps, the
//      accumulator must settle near 5000e-6 * 512 * 32 = 81.9 and lead_f
//      pulses carry the compensation.
//   C  Serial-ATA spread spectrum: 33 kHz triangle, 0..-5000 ppm down
//      spreading, starting at the -5000 ppm corner, for 1.25 modulation
//      periods: sf must follow -ppm * 512 * 32 / 1e6 within TRACK_TOL steps
//      and the data must come through error-free.
// All data edges carry random jitter of up to +/-50 ps (0.3 UI peak to
// peak, triangular density). Recovered bits are checked against the PRBS7
// recurrence b[n] = b[n-6] ^ b[n-7], so no alignment to the source is
// needed; the serialized output dout_ser is checked against rdata. Each loop
// mechanism (lead_p, lag_p, lead_f, lag_f, both lock steps, coarse tune
// changes, a turn of the phase, Ts accumulator updates, the test clock
// source) is counted, and one that never happens is a failure.
module tb_ssc_cdr_top;
  import cdr_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime T         = 666.664;   // 1.5 GHz, a multiple of 8 fs
  localparam realtime UI0       = T / 2.0;
  localparam realtime JIT       = 25.0;      // two uniforms of +/-25 ps
  localparam real     TS_STEPS  = 512.0 * 32.0;
  localparam int      TRACK_TOL = 12;

  logic [7:0] ph_pll = 8'h00;
  logic       clk6g = 1'b0, clk_sel = 1'b0, rst_n = 1'b1;  // reset is pulsed by each run
  logic       din;
  logic       rclk, dout_ser, lead_p, lag_p, lead_f, lag_f, prbs_tx;
  logic [1:0] rdata;
  logic [7:0] sf;
  cc_size_t   cc_size;
  logic [4:0] phase_pos;

  int checks = 0, failures = 0;

  ssc_cdr_top dut (.*);

  // ---------------------------------------------------------------- sources
  initial forever begin
    for (int i = 0; i < 8; i++) begin
      ph_pll[i] = 1'b1;
      ph_pll[(i + 4) % 8] = 1'b0;
      #(T / 8.0);
    end
  end

  initial forever #(T / 8.0) clk6g = !clk6g;

  // Data source: PRBS7 with frequency offset ppm_now (positive = faster).
  logic    din_gen = 1'b0, loopback = 1'b1;
  real     ppm_now = 0.0;
  int      ssc_on = 0;
  realtime ssc_t0 = 0.0;
  assign din = loopback ? prbs_tx : din_gen;

  function automatic real ssc_ppm(realtime t);
    real x;
    // 33 kHz triangle from -5000 ppm (t = 0) up to 0 and back.
    x = (t / 30303030.0) - $floor(t / 30303030.0);
    return -5000.0 * (x < 0.5 ? 1.0 - 2.0 * x : 2.0 * x - 1.0);
  endfunction

  initial begin
    realtime t_ideal, t_edge;
    logic [6:0] lfsr;
    logic b;
    lfsr = 7'h7f;
    t_ideal = 1000.0;
    forever begin
      if (ssc_on != 0) ppm_now = ssc_ppm($realtime - ssc_t0);
      t_ideal = t_ideal + UI0 / (1.0 + ppm_now * 1.0e-6);
      t_edge  = t_ideal + JIT * ($urandom_range(0, 2000) / 1000.0 - 1.0)
                        + JIT * ($urandom_range(0, 2000) / 1000.0 - 1.0);
      if (t_edge > $realtime) #(t_edge - $realtime);
      b = lfsr[5] ^ lfsr[6];
      lfsr = {lfsr[5:0], b};
      din_gen = b;
    end
  end

  // -------------------------------------------------------------- watchdog
  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- monitors
  int n_lead_p = 0, n_lag_p = 0, n_lead_f = 0, n_lag_f = 0;
  int n_n8 = 0, n_n32 = 0, n_coarse = 0, n_turn = 0, n_acc = 0, n_gen_clk = 0;
  int bit_errs = 0, bits_checked = 0, ser_errs = 0;
  int check_data = 0;
  logic [6:0] hist = '0;
  int nhist = 0;
  cc_size_t   size_q = CC_N2;
  logic [3:0] ca_q = 4'b0001, cb_q = 4'b0001;
  logic [4:0] pos_q = '0;
  logic [7:0] sf_q = '0;

  always @(posedge rclk) begin
    #1;
    if (rst_n) begin
      n_lead_p += int'(lead_p);
      n_lag_p  += int'(lag_p);
      n_lead_f += int'(lead_f);
      n_lag_f  += int'(lag_f);
      if (cc_size == CC_N8  && size_q == CC_N2) n_n8++;
      if (cc_size == CC_N32 && size_q == CC_N8) n_n32++;
      if (dut.ca != ca_q || dut.cb != cb_q) n_coarse++;
      if ((phase_pos == 5'd0 && pos_q == 5'd31) || (phase_pos == 5'd31 && pos_q == 5'd0)) n_turn++;
      if (sf != sf_q) n_acc++;
      if (clk_sel) n_gen_clk++;
      // PRBS7 recurrence on the recovered stream, earlier bit first.
      for (int i = 1; i >= 0; i--) begin
        if (nhist >= 7 && check_data != 0) begin
          bits_checked++;
          if (rdata[i] != (hist[5] ^ hist[6])) bit_errs++;
        end
        hist = {hist[5:0], rdata[i]};
        nhist++;
      end
    end
    size_q = cc_size; ca_q = dut.ca; cb_q = dut.cb; pos_q = phase_pos; sf_q = sf;
  end

  // Serializer: the pair shown on rdata appears on dout_ser one cycle later.
  logic [1:0] rdata_q;
  always @(posedge rclk) begin
    rdata_q <= rdata;
    #(T / 4.0);
    if (rst_n && check_data != 0) begin
      checks++;
      if (dout_ser !== rdata_q[1]) ser_errs++;
    end
    #(T / 2.0);
    if (rst_n && check_data != 0) begin
      checks++;
      if (dout_ser !== rdata_q[0]) ser_errs++;
    end
  end

  // ---------------------------------------------------------------- helpers
  task automatic do_reset();
    rst_n = 1'b0;
    #(10.0 * T);
    rst_n = 1'b1;
  endtask

  task automatic wait_ts(input int n);
    repeat (n) @(posedge dut.ss_valid);
    @(posedge rclk);
    #1;
  endtask

  task automatic expect_cond(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (sf=%0d size=%0d)", what, $signed(sf), cc_size);
    end
  endtask

  task automatic data_phase(input int n_ts, input string name);
    bit_errs = 0; bits_checked = 0;
    check_data = 1;
    wait_ts(n_ts);
    check_data = 0;
    checks++;
    if (bit_errs != 0 || bits_checked < 1000) begin
      failures++;
      $display("FAIL %s: %0d bit errors in %0d bits", name, bit_errs, bits_checked);
    end else $display("%s: %0d bits recovered without error", name, bits_checked);
  endtask

  // ------------------------------------------------------------- scenarios
  initial begin
    int worst, err;
    real expv;
    // A: generator clock, PRBS loopback, 0 ppm.
    clk_sel = 1'b1;
    loopback = 1'b1;
    #(20.0 * T);
    do_reset();
    wait_ts(4);
    expect_cond(cc_size == CC_N32, "A: N did not reach 32");
    data_phase(4, "A loopback");
    expect_cond(ser_errs == 0, "A: serializer output differs from rdata");

    // B: +5000 ppm source.
    clk_sel = 1'b0;
    loopback = 1'b0;
    ppm_now = 5000.0;
    do_reset();
    wait_ts(1);
    $display("B: first Ts count %0d", $signed(dut.ss));
    expect_cond($signed(dut.ss) > 60, "B: first Ts should see a large lead count");
    wait_ts(5);
    $display("B: sf=%0d size=%0d", $signed(sf), cc_size);
    expect_cond($signed(sf) >= 82 - 6 && $signed(sf) <= 82 + 6, "B: sf not near +82");
    expect_cond(cc_size == CC_N32, "B: N did not reach 32");
    data_phase(4, "B +5000 ppm");

    // C: spread spectrum from the -5000 ppm corner.
    ssc_t0 = $realtime;
    ssc_on = 1;
    do_reset();
    wait_ts(3);
    worst = 0;
    check_data = 1; bit_errs = 0; bits_checked = 0;
    for (int i = 0; i < 108; i++) begin
      wait_ts(1);
      // Residual of the Ts just closed is folded into sf now; compare with
      // the mean offset of that Ts.
      expv = -ssc_ppm($realtime - ssc_t0 - 0.5 * 512.0 * T) * TS_STEPS * 1.0e-6;
      err = $signed(sf) + int'(expv);
      if (err < 0) err = -err;
      if (err > worst) worst = err;
      if (i % 12 == 0) $display("C: ppm=%7.1f sf=%4d ideal=%6.1f size=%0d", ppm_now, $signed(sf), -expv, cc_size);
      checks++;
      if (err > TRACK_TOL) begin
        failures++;
        $display("FAIL C: sf=%0d ideal=%0.1f", $signed(sf), -expv);
      end
    end
    check_data = 0;
    $display("C: worst tracking error %0d steps, %0d bits, %0d errors", worst, bits_checked, bit_errs);
    checks++;
    if (bit_errs != 0) begin failures++; $display("FAIL C: bit errors"); end

    // Mechanism coverage.
    $display("lead_p=%0d lag_p=%0d lead_f=%0d lag_f=%0d N->8=%0d N->32=%0d coarse=%0d turns=%0d sf updates=%0d gen-clock cycles=%0d",
             n_lead_p, n_lag_p, n_lead_f, n_lag_f, n_n8, n_n32, n_coarse, n_turn, n_acc, n_gen_clk);
    expect_cond(n_lead_p > 0, "lead_p never seen");
    expect_cond(n_lag_p > 0,  "lag_p never seen");
    expect_cond(n_lead_f > 0, "lead_f never seen");
    expect_cond(n_lag_f > 0,  "lag_f never seen");
    expect_cond(n_n8 > 0,     "N 2->8 never seen");
    expect_cond(n_n32 > 0,    "N 8->32 never seen");
    expect_cond(n_coarse > 0, "coarse tune never changed");
    expect_cond(n_turn > 0,   "phase never wrapped a full turn");
    expect_cond(n_acc > 0,    "accumulator never updated");
    expect_cond(n_gen_clk > 0, "generator clock never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
