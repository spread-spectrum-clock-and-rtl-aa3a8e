// Clock source multiplexer of the test setup: feeds the phase selector
// either from the on-chip 8-phase PLL (sel = 0) or from the 8-phase clock
// generator driven by an external 6 GHz clock (sel = 1). Combinational;
// sel is meant to be static while the CDR runs. The select polarity is this
// design's choice.
module clk_src_mux (
  input  logic [7:0] ph_pll,
  input  logic [7:0] ph_gen,
  input  logic       sel,
  output logic [7:0] ph
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb ph = sel ? ph_gen : ph_pll;

endmodule
