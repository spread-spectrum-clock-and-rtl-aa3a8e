// Carry-look-ahead adder.
//
// Used as the 6-bit adder of the variable-sized confidence counter and as
// the 8-bit adder of the pulse accumulator. Every carry is formed directly
// from the generate (a&b) and propagate (a^b) terms of the bits below it and
// the carry-in, so no carry ripples through the bits: c[i] = g[i-1] |
// p[i-1]g[i-2] | ... | p[i-1]..p[0]cin. The transistor-level style of the
// original (pseudo-NMOS gates) is not represented. Combinational.
module cla_adder #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  timeunit 1ps;
  timeprecision 1fs;


  logic [W-1:0] g, p;
  logic [W:0]   c;

  always_comb begin
    logic term;
    g = a & b;
    p = a ^ b;
    c = '0;
    c[0] = cin;
    for (int i = 1; i <= W; i++) begin
      // Carry into bit i: OR over j of g[j] propagated through p[i-1:j+1],
      // plus cin propagated through p[i-1:0].
      term = cin;
      for (int k = 0; k < i; k++) term = term & p[k];
      c[i] = term;
      for (int j = 0; j < i; j++) begin
        term = g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        c[i] = c[i] | term;
      end
    end
    s    = p ^ c[W-1:0];
    cout = c[W];
  end

endmodule
