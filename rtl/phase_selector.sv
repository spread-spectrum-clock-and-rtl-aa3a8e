// Phase selector (phase interpolator) - BEHAVIOURAL MODEL, not synthesizable.
//
// The real part is analog: ca (one-hot, even PLL phase 0/2/4/6) and cb
// (one-hot, odd phase 1/3/5/7) pick two neighbouring phases of the 8-phase
// 1.5 GHz clock, and four tri-state inverter cells per side mix them; d is
// the thermometer count of cells driven by the cb phase. This gives 4 steps
// between neighbouring phases, 32 steps (20.83 ps) per period. Two such
// interpolators, the second fed with phases two positions later, and their
// complementary outputs make the four recovered phases P0..P3, 90 degrees
// apart.
//
// The model measures the input period on ph[0] and then places the P0 rising
// edge of cycle n at t0 + n*T + u*T/32, where u is the selected position
// unwrapped over turns, so a step of the code moves the clock by exactly
// T/32 and a wrap past phase 7 stretches one period instead of skipping it.
// Interpolation is ideal (linear); the 1.2% step error the document reports
// is not modelled. The code is sampled once per cycle, half a period after
// the P0 rising edge; the code may move by a few steps per cycle at most.
module phase_selector (
  input  logic [7:0] ph,      // 8-phase clock, ph[i] at i*45 degrees
  input  logic [3:0] ca,
  input  logic [3:0] cb,
  input  logic [3:0] d,
  output logic [3:0] clk4     // P0..P3
);
  timeunit 1ps;
  timeprecision 1fs;

  function automatic int code_pos(input logic [3:0] a, input logic [3:0] b, input logic [3:0] f);
    int ia, ib, k;
    ia = 0; ib = 0;
    for (int i = 0; i < 4; i++) begin
      if (a[i]) ia = i;
      if (b[i]) ib = i;
    end
    k = int'(f[0]) + int'(f[1]) + int'(f[2]) + int'(f[3]);
    // cb above ca when its odd phase 2*ib+1 follows the even phase 2*ia.
    return (ib == ia) ? ((8 * ia + k) % 32) : ((8 * ia - k + 32) % 32);
  endfunction

  realtime t0, tper, tr, wait_t;
  int      u, p, delta;
  longint  n;

  initial begin
    clk4 = 4'b1100;
    @(posedge ph[0]);
    t0 = $realtime;
    @(posedge ph[0]);
    tper = $realtime - t0;
    t0   = $realtime;
    u    = code_pos(ca, cb, d);
    n    = 0;
    forever begin
      tr     = t0 + real'(n) * tper + real'(u) * tper / 32.0;
      wait_t = tr - $realtime;
      if (wait_t > 0.0) #(wait_t);
      clk4[0] = 1'b1; clk4[2] = 1'b0;
      #(tper / 4.0);
      clk4[1] = 1'b1; clk4[3] = 1'b0;
      #(tper / 4.0);
      clk4[0] = 1'b0; clk4[2] = 1'b1;
      // Follow the code by the shortest way round.
      p     = code_pos(ca, cb, d);
      delta = (p - (u % 32) + 48) % 32 - 16;
      u     = u + delta;
      #(tper / 4.0);
      clk4[1] = 1'b0; clk4[3] = 1'b1;
      n = n + 1;
    end
  end

  // Only ph[0] sets the timing; the others are implied by it in this model.
  logic unused_ph;
  assign unused_ph = ^ph[7:1];

endmodule
