// Workload testbench: Serial-ATA spread spectrum entered with no initial
// offset. The CDR is reset on a clean 0 ppm PRBS7 stream; once it has locked
// (N = 32), a 33 kHz triangular down-spread starts from 0 ppm, reaches
// -5000 ppm after half a period and returns, for one full modulation period
// (about 89 compensation periods). After every Ts the accumulator must be
// within TRACK_TOL steps of the ideal -ppm * 512 * 32 / 1e6, the recovered
// data must satisfy the PRBS7 recurrence without error, and lag_f must carry
// the compensation. Data edges carry up to +/-50 ps random jitter. Runs at
// the top's default sizes.
module tb_ssc_zero_start;
  import cdr_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime T         = 666.664;
  localparam realtime UI0       = T / 2.0;
  localparam realtime JIT       = 25.0;
  localparam realtime TMOD      = 30303030.0;   // 1 / 33 kHz
  localparam int      TRACK_TOL = 8;

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
    wait_ts(4);
    checks++;
    if (cc_size != CC_N32) begin failures++; $display("FAIL no lock before the sweep"); end
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
    $display("worst tracking error %0d steps; %0d bits, %0d errors; %0d lag_f pulses",
             worst, bits_checked, bit_errs, n_lag_f);
    checks++;
    if (bit_errs != 0 || bits_checked < 50000) begin failures++; $display("FAIL data"); end
    checks++;
    if (n_lag_f < 1000) begin failures++; $display("FAIL too few lag_f pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
