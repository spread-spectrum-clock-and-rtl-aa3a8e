// Phase control: fine tune and coarse tune state of the phase selector.
//
// The recovered clock position is one of 32 steps of a clock period. Coarse
// tune holds two one-hot selectors: ca picks an even PLL phase (0,2,4,6) and
// cb an odd one (1,3,5,7); the two are always neighbours. Fine tune d is a
// 4-bit thermometer code: the number of interpolator cells driven by the cb
// phase (0000 = all on ca, 1111 = all on cb). A step toward cb shifts a one
// into d; a step away shifts it out. Only when d is already 1111 (or 0000)
// and the step goes further does the coarse selector on the far side jump
// two phases on, so the new pair again brackets the clock and d walks back:
// every request moves the clock exactly one step, with no dead step at a
// coarse change.
//
// Requests come from the phase loop (lead_p/lag_p) and the frequency
// compensation loop (lead_f/lag_f). Lead means data earlier than the clock,
// so it moves the clock earlier (position - 1); lag moves it later. When
// several arrive in one cycle they are summed and one step is taken in the
// sign of the sum; this arbitration is a choice of this design.
//
// Reset selects phases 0 and 1 with d = 0000 (position 0), as in the
// document. Registered on clk (recovered P0); pos is the decoded position.
module phase_control
  import cdr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       lead_p,
  input  logic       lag_p,
  input  logic       lead_f,
  input  logic       lag_f,
  output logic [3:0] ca,
  output logic [3:0] cb,
  output logic [3:0] d,
  output logic [4:0] pos
);
  timeunit 1ps;
  timeprecision 1fs;


  logic signed [2:0] net;
  logic              step_up, step_dn;   // later / earlier
  logic              b_above;            // cb phase = ca phase + 1
  logic [1:0]        ia, ib;             // one-hot indices
  logic [2:0]        k;                  // cells on cb
  logic [3:0]        ca_n, cb_n, d_n;

  function automatic logic [1:0] oh2idx(input logic [3:0] oh);
    oh2idx = 2'd0;
    for (int i = 0; i < 4; i++) if (oh[i]) oh2idx = 2'(i);
  endfunction

  function automatic logic [3:0] rotl(input logic [3:0] v);
    rotl = {v[2:0], v[3]};
  endfunction

  function automatic logic [3:0] rotr(input logic [3:0] v);
    rotr = {v[0], v[3:1]};
  endfunction

  always_comb begin
    net     = 3'(lag_p) + 3'(lag_f) - 3'(lead_p) - 3'(lead_f);
    step_up = (net > 3'sd0);
    step_dn = (net < 3'sd0);
    ia      = oh2idx(ca);
    ib      = oh2idx(cb);
    // even phase 2*ia, odd phase 2*ib+1: cb is above when ib == ia.
    b_above = (ib == ia);
    k       = 3'(d[0]) + 3'(d[1]) + 3'(d[2]) + 3'(d[3]);
    pos     = b_above ? 5'({ia, 3'b000} + 5'(k)) : 5'({ia, 3'b000} - 5'(k));

    ca_n = ca;
    cb_n = cb;
    d_n  = d;
    // Moving toward cb when (up and cb above) or (down and cb below).
    if (step_up || step_dn) begin
      if (step_up == b_above) begin
        if (d != 4'b1111) d_n = {d[2:0], 1'b1};
        else begin
          ca_n = step_up ? rotl(ca) : rotr(ca);   // ca jumps over cb
          d_n  = 4'b0111;
        end
      end else begin
        if (d != 4'b0000) d_n = {1'b0, d[3:1]};
        else begin
          cb_n = step_up ? rotl(cb) : rotr(cb);   // cb jumps over ca
          d_n  = 4'b0001;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ca <= 4'b0001;
      cb <= 4'b0001;
      d  <= 4'b0000;
    end else begin
      ca <= ca_n;
      cb <= cb_n;
      d  <= d_n;
    end
  end

endmodule
