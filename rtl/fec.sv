// Frequency error compensator (FEC).
//
// A divide-by-4 counter (the "ripple counter", giving Clk_r) and a 7-bit
// counter q clocked by it together count the TS_CYCLES = 512 cycles of one
// compensation period Ts; ts_tick marks its last cycle. Within Ts, q takes
// every value 0..127 once. Signal C_k is active for the q whose lowest set
// bit is k, which happens 2^(6-k) times per Ts (C0: 64 ... C6: 1), and no two
// C_k are active together, so the chosen C_k add up exactly. The magnitude
// of the accumulator value sf (two's-complement negated when the sign SF7 is
// set) enables C_k through bit 6-k, and the selected pulses go to lead_f
// when sf is positive, lag_f when negative. Example: sf = 20 enables C2 (16)
// and C4 (4), giving 20 lead_f pulses spread over Ts.
//
// Timing: a pulse is one core cycle wide, issued in the last cycle of a
// Clk_r period, so pulses are at least 4 cycles apart. sf is used as it is;
// it changes only early in Ts, when q = 0 and no C_k is active.
//
// From the document: the divide-by-4 stage, the 7-bit counter, the C0..C6
// pulse trains, the sign-controlled magnitude select and the sf = 20
// example. Own choices: the divider and counter are one synchronous 9-bit
// counter (the document's divider is a ripple chain), the C_k decode by
// lowest set bit, and the registered outputs.
module fec #(
  parameter int unsigned TS_CYCLES = 512,
  parameter int unsigned MAG_W     = 7
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [MAG_W:0] sf,
  output logic                  lead_f,
  output logic                  lag_f,
  output logic                  ts_tick
);
  timeunit 1ps;
  timeprecision 1fs;


  localparam int unsigned CW = $clog2(TS_CYCLES);  // 9: 2 ripple + 7 counter bits

  logic [CW-1:0]    tcnt;
  logic [1:0]       rip;
  logic [MAG_W-1:0] q;
  logic [MAG_W-1:0] mag;
  logic [MAG_W-1:0] c;        // C0..C(MAG_W-1)
  logic             fire;

  assign rip = tcnt[1:0];
  assign q   = tcnt[CW-1:2];

  always_comb begin
    mag = sf[MAG_W] ? MAG_W'(-sf) : sf[MAG_W-1:0];
    // C_k: lowest set bit of q is k.
    for (int k = 0; k < int'(MAG_W); k++) begin
      c[k] = q[k] && ((q & MAG_W'((1 << k) - 1)) == '0);
    end
    fire = 1'b0;
    for (int k = 0; k < int'(MAG_W); k++) begin
      fire = fire | (c[k] & mag[MAG_W-1-k]);
    end
    fire    = fire && (rip == 2'd3);
    ts_tick = (tcnt == CW'(TS_CYCLES - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt   <= '0;
      lead_f <= 1'b0;
      lag_f  <= 1'b0;
    end else begin
      tcnt   <= tcnt + CW'(1);
      lead_f <= fire && !sf[MAG_W];
      lag_f  <= fire &&  sf[MAG_W];
    end
  end

  initial assert (TS_CYCLES == (4 << MAG_W))
    else $error("fec: TS_CYCLES must be 4 * 2**MAG_W");

endmodule
