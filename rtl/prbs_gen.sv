// PRBS test pattern generator, two bits per clock.
//
// A 7-bit Fibonacci LFSR for x^7 + x^6 + 1 (period 127), stepped twice per
// 1.5 GHz cycle so that, serialized, it gives a 3 Gb/s stream: bit b[n] =
// b[n-6] ^ b[n-7]. q2[1] is the earlier bit. The document does not give the
// polynomial; PRBS7 is this design's choice. Seed after reset: all ones.
// Registered outputs.
module prbs_gen (
  input  logic       clk,
  input  logic       rst_n,
  output logic [1:0] q2
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned ORDER = 7;

  // s[0] is the newest bit, s[i] the bit i+1 steps back.
  logic [ORDER-1:0] s;
  logic             b0, b1;

  always_comb begin
    b0 = s[ORDER-2] ^ s[ORDER-1];
    b1 = s[ORDER-3] ^ s[ORDER-2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s  <= '1;
      q2 <= '0;
    end else begin
      s  <= {s[ORDER-3:0], b0, b1};
      q2 <= {b0, b1};
    end
  end

endmodule
