// Pulse counter of the frequency compensation loop.
//
// An up/down counter of the confidence counter's decisions: +1 per lead_p,
// -1 per lag_p. Over one compensation period Ts its value is the phase the
// phase loop still had to correct, i.e. the residual frequency error in
// interpolation steps per Ts. In the last cycle of Ts (ts_tick) the count,
// including that cycle's pulse, is handed out as ss with a one-cycle
// ss_valid strobe, and counting restarts from zero. The count saturates at
// +/-(2^(W-1)-1) instead of wrapping (the document does not say what happens
// on overflow).
//
// Timing: ss/ss_valid are registered; ss holds its value until the next Ts.
module pulse_counter #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                lead_p,
  input  logic                lag_p,
  input  logic                ts_tick,
  output logic signed [W-1:0] ss,
  output logic                ss_valid
);
  timeunit 1ps;
  timeprecision 1fs;


  localparam logic signed [W-1:0] MAXV = W'((1 << (W - 1)) - 1);

  logic signed [W-1:0] cnt, cnt_n;

  always_comb begin
    cnt_n = cnt;
    if (lead_p && !lag_p && cnt != MAXV)       cnt_n = cnt + W'(1);
    else if (lag_p && !lead_p && cnt != -MAXV) cnt_n = cnt - W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      ss       <= '0;
      ss_valid <= 1'b0;
    end else begin
      ss_valid <= ts_tick;
      if (ts_tick) begin
        ss  <= cnt_n;
        cnt <= '0;
      end else begin
        cnt <= cnt_n;
      end
    end
  end

endmodule
