// Pulse accumulator of the frequency compensation loop.
//
// Once per compensation period, when ss_valid strobes, the residual count ss
// of the pulse counter is added to sf through an 8-bit carry-look-ahead
// adder. sf is the number of compensation steps the FEC issues per Ts (sign
// in the top bit), so the loop integrates the frequency error and follows a
// spread-spectrum ramp in small increments. The sum is limited to
// +/-(2^(W-1)-1), the range the FEC's magnitude bits can express; this clamp
// is a choice of this design.
//
// Timing: sf is registered and changes in the cycle after ss_valid.
module pulse_accumulator #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] ss,
  input  logic                ss_valid,
  output logic signed [W-1:0] sf
);
  timeunit 1ps;
  timeprecision 1fs;


  localparam logic signed [W-1:0] MAXV = W'((1 << (W - 1)) - 1);

  logic [W-1:0]        sum;
  logic                unused_cout;
  logic                ovf;
  logic signed [W-1:0] sf_n;

  cla_adder #(.W(W)) u_add (
    .a   (sf),
    .b   (ss),
    .cin (1'b0),
    .s   (sum),
    .cout(unused_cout)
  );

  always_comb begin
    // Two's-complement overflow: operands of equal sign, result of the other.
    ovf = (sf[W-1] == ss[W-1]) && (sum[W-1] != sf[W-1]);
    if (ovf)                         sf_n = sf[W-1] ? -MAXV : MAXV;
    else if (sum == {1'b1, {(W-1){1'b0}}}) sf_n = -MAXV;
    else                             sf_n = sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sf <= '0;
    else if (ss_valid) sf <= sf_n;
  end

endmodule
