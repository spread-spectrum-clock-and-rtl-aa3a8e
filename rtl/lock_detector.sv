// Lock detector: chooses the confidence counter size N.
//
// After reset N = 2, a wide loop bandwidth that pulls in a large initial
// frequency offset. At the end of every compensation period the pulse
// counter's value ss (lead_p minus lag_p over Ts) is checked: if its
// magnitude is below the limit for the present size the loop counts as
// locked and N steps up, 2 -> 8 -> 32, narrowing the bandwidth. The N = 2
// limit is 64 (a 37.5%/62.5% lead/lag split over 256 decisions, from the
// document); the N = 8 limit of 16 is this design's reading (the document
// only says bits SS4 and SS3 are watched). N = 32 is kept until reset.
//
// Timing: size changes in the cycle after ss_valid.
module lock_detector
  import cdr_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter int unsigned LIM_N2 = 64,
  parameter int unsigned LIM_N8 = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] ss,
  input  logic                ss_valid,
  output cc_size_t            size
);
  timeunit 1ps;
  timeprecision 1fs;


  logic [W-1:0] mag;
  logic         locked;

  always_comb begin
    mag = ss[W-1] ? W'(-ss) : W'(ss);
    unique case (size)
      CC_N2:   locked = (32'(mag) < LIM_N2);
      CC_N8:   locked = (32'(mag) < LIM_N8);
      default: locked = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) size <= CC_N2;
    else if (ss_valid && locked) begin
      unique case (size)
        CC_N2:   size <= CC_N8;
        CC_N8:   size <= CC_N32;
        default: size <= CC_N32;
      endcase
    end
  end

endmodule
