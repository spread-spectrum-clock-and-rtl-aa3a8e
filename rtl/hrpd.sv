// Half-rate bang-bang phase detector (HRPD).
//
// Four flip-flops sample the 3 Gb/s input on the four recovered clock
// phases: P0 and P2 land on the bit boundaries, P1 and P3 in the bit
// centres, so one 1.5 GHz cycle covers two bits. All samples are retimed to
// P0. Per cycle there are two boundary decisions (Alexander type):
//   boundary 1: previous P3 bit -> P1 bit, judged by the P0 sample;
//   boundary 2: P1 bit -> P3 bit, judged by the P2 sample.
// With a transition, a boundary sample that already equals the new bit means
// the data edge came before the clock edge: Lead (data earlier than clock).
// A boundary sample equal to the old bit is Lag. No transition gives
// neither. The two centre samples are the recovered data.
//
// Interface: pd = {Lead1, Lead2, Lag1, Lag2} (S3..S0 of the encoder),
// rdata = {P1 bit, P3 bit} (earlier bit in [1]). Both are registered on P0
// and describe the cycle that ended at the previous P0 edge. The sampler
// arrangement is this design's; the document gives the detector's function
// and output coding.
module hrpd (
  input  logic [3:0] clk4,   // P0..P3
  input  logic       rst_n,
  input  logic       din,
  output logic [3:0] pd,
  output logic [1:0] rdata
);
  timeunit 1ps;
  timeprecision 1fs;


  logic s0, s1, s2, s3;        // raw samples, one per phase
  logic e0, d1, e2, d3, d3_prev;

  always_ff @(posedge clk4[0]) s0 <= din;
  always_ff @(posedge clk4[1]) s1 <= din;
  always_ff @(posedge clk4[2]) s2 <= din;
  always_ff @(posedge clk4[3]) s3 <= din;

  // Retime: at a P0 edge, s1..s3 come from the cycle just ended and s0 (not
  // yet overwritten) from the start of that cycle.
  always_ff @(posedge clk4[0] or negedge rst_n) begin
    if (!rst_n) begin
      e0 <= 1'b0; d1 <= 1'b0; e2 <= 1'b0; d3 <= 1'b0; d3_prev <= 1'b0;
    end else begin
      e0      <= s0;
      d1      <= s1;
      e2      <= s2;
      d3      <= s3;
      d3_prev <= d3;
    end
  end

  logic lead1, lag1, lead2, lag2;

  always_comb begin
    lead1 = (d3_prev != d1) && (e0 == d1);
    lag1  = (d3_prev != d1) && (e0 == d3_prev);
    lead2 = (d1 != d3) && (e2 == d3);
    lag2  = (d1 != d3) && (e2 == d1);
  end

  always_ff @(posedge clk4[0] or negedge rst_n) begin
    if (!rst_n) begin
      pd    <= '0;
      rdata <= '0;
    end else begin
      pd    <= {lead1, lead2, lag1, lag2};
      rdata <= {d1, d3};
    end
  end

endmodule
