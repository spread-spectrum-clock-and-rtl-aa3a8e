// Variable-sized confidence counter (the loop filter of the phase loop).
//
// Each core cycle the encoded phase-detector value pd_val (-2..+2, positive
// = data earlier than the clock) is added to a W-bit two's-complement
// accumulator through a carry-look-ahead adder. The size N picks the
// watched sum bit: SO1 for N=2, SO3 for N=8, SO5 for N=32. A rise of that
// bit on a positive input is a lead decision (sum reaches +N); a fall on a
// negative input is a lag decision (sum reaches -(N+1), or wraps past -32 for
// N=32). The asymmetric thresholds follow the document's Table 4.2. After a
// decision the accumulator restarts from zero (this reset is a design
// choice; the document does not say).
//
// Timing: lead_p/lag_p are registered, one cycle wide, in the cycle after
// the input that crossed the threshold.
module vs_conf_counter
  import cdr_pkg::*;
#(
  parameter int unsigned W = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [2:0]  pd_val,
  input  cc_size_t           size,
  output logic               lead_p,
  output logic               lag_p,
  output logic [W-1:0]       acc
);
  timeunit 1ps;
  timeprecision 1fs;


  logic [W-1:0] sum;
  logic         unused_cout;
  logic         bit_old, bit_new, lead_d, lag_d;
  logic [2:0]   k;

  cla_adder #(.W(W)) u_add (
    .a   (acc),
    .b   ({{(W-3){pd_val[2]}}, pd_val}),
    .cin (1'b0),
    .s   (sum),
    .cout(unused_cout)
  );

  always_comb begin
    unique case (size)
      CC_N2:   k = 1;
      CC_N8:   k = 3;
      default: k = 3'(W - 1);
    endcase
    bit_old = acc[k];
    bit_new = sum[k];
    lead_d  = !pd_val[2] && (pd_val != 3'sd0) && !bit_old && bit_new;
    lag_d   =  pd_val[2] && bit_old && !bit_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      lead_p <= 1'b0;
      lag_p  <= 1'b0;
    end else begin
      acc    <= (lead_d || lag_d) ? '0 : sum;
      lead_p <= lead_d;
      lag_p  <= lag_d;
    end
  end

endmodule
