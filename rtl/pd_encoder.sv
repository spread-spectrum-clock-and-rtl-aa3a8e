// Phase detector output encoder.
//
// The half-rate phase detector gives two lead/lag decisions per core cycle:
// s = {S3,S2,S1,S0} = {Lead1, Lead2, Lag1, Lag2}. This block turns them into
// the 3-bit two's-complement value (#lead - #lag), -2..+2, that the
// confidence counter adds up: positive means data earlier than the clock.
// The mapping is the document's encoder truth table; it is written here as
// the signed sum rather than as a sum of products. Purely combinational.
module pd_encoder (
  input  logic [3:0]        s,   // {Lead1, Lead2, Lag1, Lag2}
  output logic signed [2:0] a    // {A2 (sign), A1, A0}
);
  timeunit 1ps;
  timeprecision 1fs;


  always_comb begin
    a = 3'(s[3]) + 3'(s[2]) - 3'(s[1]) - 3'(s[0]);
  end

endmodule
