// Workload testbench: spread spectrum under the random input jitter assumed
// when the lock limits were derived, 0.3 UI taken as +/-3 sigma of a Gaussian
// (sigma = 33.33 ps at 3 Gb/s). Every data edge is displaced independently by
// a Gaussian sample (Box-Muller from $urandom, clipped at +/-3 sigma). The
// CDR is reset on a 0 ppm PRBS7 stream and must reach N = 32 through both
// lock steps despite the jitter; then a 33 kHz triangular down-spread runs
// from 0 ppm to -5000 ppm and back for one modulation period. After every Ts
// the accumulator must be within TRACK_TOL steps of the ideal
// -ppm * 512 * 32 / 1e6, and the recovered data must follow the PRBS7
// recurrence with no more than MAX_BER of the bits wrong. Runs at the top's
// default sizes.
module tb_ssc_jitter;
  import cdr_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime T         = 666.664;
  localparam realtime UI0       = T / 2.0;
  localparam realtime SIGMA     = 33.33;        // 0.1 UI
  localparam real     MAX_BER   = 1.0e-4;
  localparam realtime TMOD      = 30303030.0;   // 1 / 33 kHz
  localparam int      TRACK_TOL = 10;

  logic [7:0] ph_pll = 8'h00;
  logic       clk6g = 1'b0, clk_sel = 1'b0, rst_n = 1'b1;
  logic       din = 1'b0;
  logic       rclk, dout_ser, lead_p, lag_p, lead_f, lag_f, prbs_tx;
  logic [1:0] rdata;
  logic [7:0] sf;
  cc_size_t   cc_size;
  logic [4:0] phase_pos;

  int checks = 0, failures = 0;

  ssc_cdr_top dut (.*);

  initial forever begin
    for (int i = 0; i < 8; i++) begin
      ph_pll[i] = 1'b1;
      ph_pll[(i + 4) % 8] = 1'b0;
      #(T / 8.0);
    end
  end

  real     ppm_now = 0.0;
  int      ssc_on = 0;
  realtime ssc_t0 = 0.0;

  function automatic real ssc_ppm(realtime t);
    real x;
    x = (t / TMOD) - $floor(t / TMOD);
    return -5000.0 * (x < 0.5 ? 2.0 * x : 2.0 - 2.0 * x);
  endfunction

  // Standard normal sample, clipped at +/-3.
  function automatic real gauss();
    real u1, u2, g;
    u1 = real'($urandom_range(1, 1000000)) / 1.0e6;
    u2 = real'($urandom_range(0, 999999)) / 1.0e6;
    g  = $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
    if (g > 3.0) g = 3.0;
    if (g < -3.0) g = -3.0;
    return g;
  endfunction

  real worst_jit = 0.0;

  initial begin
    realtime t_ideal, t_edge;
    real j;
    logic [6:0] lfsr;
    logic b;
    lfsr = 7'h7f;
    t_ideal = 1000.0;
    forever begin
      if (ssc_on != 0) ppm_now = ssc_ppm($realtime - ssc_t0);
      t_ideal = t_ideal + UI0 / (1.0 + ppm_now * 1.0e-6);
      j = SIGMA * gauss();
      if (j > worst_jit) worst_jit = j;
      if (-j > worst_jit) worst_jit = -j;
      t_edge  = t_ideal + j;
      if (t_edge > $realtime) #(t_edge - $realtime);
      b = lfsr[5] ^ lfsr[6];
      lfsr = {lfsr[5:0], b};
      din = b;
    end
  end

  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bit_errs = 0, bits_checked = 0, check_data = 0, n_lag_f = 0, nhist = 0;
  int n_to_n8 = 0, n_to_n32 = 0;
  cc_size_t size_q = CC_N2;

  always @(posedge rclk) begin
    if (!rst_n) size_q <= CC_N2;
    else begin
      if (size_q == CC_N2 && cc_size == CC_N8) n_to_n8++;
      if (size_q == CC_N8 && cc_size == CC_N32) n_to_n32++;
      size_q <= cc_size;
    end
  end
  logic [6:0] hist = '0;

  always @(posedge rclk) begin
    #1;
    if (rst_n) begin
      if (check_data != 0) n_lag_f += int'(lag_f);
      for (int i = 1; i >= 0; i--) begin
        if (nhist >= 7 && check_data != 0) begin
          bits_checked++;
          if (rdata[i] != (hist[5] ^ hist[6])) bit_errs++;
        end
        hist = {hist[5:0], rdata[i]};
        nhist++;
      end
    end
  end

  task automatic wait_ts(input int n);
    repeat (n) @(posedge dut.ss_valid);
    @(posedge rclk);
    #1;
  endtask

  initial begin
    int worst, err, n_ts;
    real expv;
    #(20.0 * T);
    rst_n = 1'b0;
    #(10.0 * T);
    rst_n = 1'b1;
    wait_ts(6);
    checks++;
    if (cc_size != CC_N32 || n_to_n8 != 1 || n_to_n32 != 1) begin
      failures++; $display("FAIL no lock before the sweep (N2->N8 %0d, N8->N32 %0d)", n_to_n8, n_to_n32);
    end
    ssc_t0 = $realtime;
    ssc_on = 1;
    check_data = 1;
    worst = 0;
    n_ts = int'(TMOD / (512.0 * T));
    for (int i = 0; i < n_ts; i++) begin
      wait_ts(1);
      expv = -ssc_ppm($realtime - ssc_t0 - 0.5 * 512.0 * T) * 512.0 * 32.0 * 1.0e-6;
      err = int'($signed(sf)) + int'(expv);
      if (err < 0) err = -err;
      if (err > worst) worst = err;
      if (i % 8 == 0) $display("Ts %3d: ppm=%7.1f sf=%4d ideal=%6.1f", i, ppm_now, $signed(sf), -expv);
      checks++;
      if (err > TRACK_TOL) begin
        failures++; $display("FAIL Ts %0d: sf=%0d ideal=%0.1f", i, $signed(sf), -expv);
      end
    end
    check_data = 0;
    $display("worst tracking error %0d steps; %0d bits, %0d errors; %0d lag_f pulses; largest jitter %0.1f ps",
             worst, bits_checked, bit_errs, n_lag_f, worst_jit);
    checks++;
    if (real'(bit_errs) > MAX_BER * real'(bits_checked) || bits_checked < 50000) begin
      failures++; $display("FAIL data");
    end
    checks++;
    if (worst_jit < 2.5 * SIGMA) begin failures++; $display("FAIL jitter source too weak"); end
    checks++;
    if (cc_size != CC_N32) begin failures++; $display("FAIL lock lost during the sweep"); end
    checks++;
    if (n_lag_f < 1000) begin failures++; $display("FAIL too few lag_f pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
