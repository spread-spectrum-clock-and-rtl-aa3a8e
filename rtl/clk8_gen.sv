// 8-phase clock generator for the test clock path.
//
// Divides a 6 GHz clock by four into a 1.5 GHz clock with eight phases 45
// degrees (83.3 ps) apart. A two-stage Johnson counter on the rising edge
// gives a0 and a1, 90 degrees apart; their complements give 180 and 270
// degrees. A second pair of flip-flops copies a0/a1 on the falling edge, half
// a 6 GHz period (45 degrees) later. ph[i] is at i*45 degrees. The document
// names the function only; the circuit is this design's.
module clk8_gen (
  input  logic       clk6g,
  input  logic       rst_n,
  output logic [7:0] ph
);
  timeunit 1ps;
  timeprecision 1fs;

  logic a0, a1, b0, b1;

  always_ff @(posedge clk6g or negedge rst_n) begin
    if (!rst_n) begin
      a0 <= 1'b0;
      a1 <= 1'b0;
    end else begin
      a0 <= !a1;
      a1 <= a0;
    end
  end

  always_ff @(negedge clk6g or negedge rst_n) begin
    if (!rst_n) begin
      b0 <= 1'b0;
      b1 <= 1'b0;
    end else begin
      b0 <= a0;
      b1 <= a1;
    end
  end

  assign ph = {!b1, !a1, !b0, !a0, b1, a1, b0, a0};

endmodule
