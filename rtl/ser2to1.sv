// 2-to-1 serializer: turns the two half-rate bits of each 1.5 GHz cycle
// back into one 3 Gb/s stream for measurement. The pair d2 is registered on
// the rising clock edge; the earlier bit d2[1] is sent while clk is high and
// d2[0] while it is low, so dout lags the inputs by one clock cycle. The
// circuit is this design's; the document only names the function.
module ser2to1 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] d2,
  output logic       dout
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= '0;
    else        r <= d2;
  end

  always_comb dout = clk ? r[1] : r[0];

endmodule
