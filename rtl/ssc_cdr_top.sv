// Spread-spectrum clock and data recovery (CDR) with incremental frequency
// compensation: chip-level top.
//
// Clock path: the 8-phase 1.5 GHz source is the on-chip PLL (ph_pll, a port
// here) or the test clock generator dividing clk6g; clk_sel chooses. The
// phase selector interpolates the recovered 4-phase clock; its P0 (rclk)
// clocks all of the CDR logic.
//
// Phase loop: half-rate phase detector -> encoder -> variable-sized
// confidence counter (N = 2/8/32) -> lead_p/lag_p -> phase control -> phase
// selector. Frequency compensation loop: the pulse counter nets lead_p -
// lag_p over each Ts = 512 cycles, the pulse accumulator integrates these
// counts into sf, and the frequency error compensator (FEC) turns sf into
// |sf| evenly spread lead_f or lag_f steps per Ts, which also drive the phase
// control. The lock detector narrows the confidence counter (2 -> 8 -> 32)
// when a Ts ends with a small residual count.
//
// Measurement side: the recovered pair rdata is re-serialized to dout_ser,
// and a PRBS7 source clocked by the selected phase 0 gives a 3 Gb/s test
// stream prbs_tx (it can be looped back to din). The loop pulses, sf and
// cc_size are brought out for observation, as the document measures them.
// The PLL, the pads and the output buffers are analog and not part of this
// description.
module ssc_cdr_top
  import cdr_pkg::*;
(
  input  logic [7:0] ph_pll,
  input  logic       clk6g,
  input  logic       clk_sel,
  input  logic       rst_n,
  input  logic       din,
  output logic       rclk,
  output logic [1:0] rdata,
  output logic       dout_ser,
  output logic       lead_p,
  output logic       lag_p,
  output logic       lead_f,
  output logic       lag_f,
  output logic [7:0] sf,
  output cc_size_t   cc_size,
  output logic [4:0] phase_pos,
  output logic       prbs_tx
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [7:0]        ph_gen, ph;
  logic [3:0]        clk4;
  logic [3:0]        ca, cb, d;
  logic [3:0]        pd;
  logic signed [2:0] pd_val;
  logic signed [7:0] ss, sf_s;
  logic              ss_valid, ts_tick;
  logic [5:0]        cc_acc;
  logic [1:0]        prbs2;

  clk8_gen    u_clkgen (.clk6g(clk6g), .rst_n(rst_n), .ph(ph_gen));
  clk_src_mux u_clkmux (.ph_pll(ph_pll), .ph_gen(ph_gen), .sel(clk_sel), .ph(ph));

  phase_selector u_psel (.ph(ph), .ca(ca), .cb(cb), .d(d), .clk4(clk4));
  assign rclk = clk4[0];

  hrpd       u_pd  (.clk4(clk4), .rst_n(rst_n), .din(din), .pd(pd), .rdata(rdata));
  pd_encoder u_enc (.s(pd), .a(pd_val));

  vs_conf_counter #(.W(6)) u_cc (
    .clk(rclk), .rst_n(rst_n), .pd_val(pd_val), .size(cc_size),
    .lead_p(lead_p), .lag_p(lag_p), .acc(cc_acc)
  );

  phase_control u_pc (
    .clk(rclk), .rst_n(rst_n),
    .lead_p(lead_p), .lag_p(lag_p), .lead_f(lead_f), .lag_f(lag_f),
    .ca(ca), .cb(cb), .d(d), .pos(phase_pos)
  );

  fec #(.TS_CYCLES(TS_CYCLES), .MAG_W(7)) u_fec (
    .clk(rclk), .rst_n(rst_n), .sf(sf_s),
    .lead_f(lead_f), .lag_f(lag_f), .ts_tick(ts_tick)
  );

  pulse_counter #(.W(8)) u_pcnt (
    .clk(rclk), .rst_n(rst_n), .lead_p(lead_p), .lag_p(lag_p),
    .ts_tick(ts_tick), .ss(ss), .ss_valid(ss_valid)
  );

  pulse_accumulator #(.W(8)) u_pacc (
    .clk(rclk), .rst_n(rst_n), .ss(ss), .ss_valid(ss_valid), .sf(sf_s)
  );

  lock_detector #(.W(8)) u_lock (
    .clk(rclk), .rst_n(rst_n), .ss(ss), .ss_valid(ss_valid), .size(cc_size)
  );

  assign sf = sf_s;

  ser2to1 u_ser  (.clk(rclk), .rst_n(rst_n), .d2(rdata), .dout(dout_ser));

  prbs_gen u_prbs    (.clk(ph[0]), .rst_n(rst_n), .q2(prbs2));
  ser2to1  u_prbsser (.clk(ph[0]), .rst_n(rst_n), .d2(prbs2), .dout(prbs_tx));

  logic unused_top;
  assign unused_top = ^cc_acc;

endmodule
