// Testbench for the phase_selector model. An ideal 8-phase 1.5 GHz clock
// drives it; the code walks the 32 positions forward for more than a turn,
// back again, and then jumps by one step at random, always set just after a
// P0 rising edge as the phase control does. Each P0 rising edge must sit
// pos*T/32 after a ph[0] edge (mod T), P1 a quarter period after P0, and the
// codes are built here from the position independently of the model.
module tb_phase_selector;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime T = 666.664;  // a multiple of 8 fs, so the 8 phases are exact

  logic [7:0] ph = 8'h00;
  logic [3:0] ca = 4'b0001, cb = 4'b0001, d = 4'b0000;
  logic [3:0] clk4;
  int checks = 0, failures = 0;
  realtime t_ph0 = -1.0, t_p0;
  int pos = 0, applied = 0;

  phase_selector dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ph[i] rises at i*T/8.
  initial begin
    forever begin
      for (int i = 0; i < 8; i++) begin
        ph[i] = 1'b1;
        ph[(i + 4) % 8] = 1'b0;
        #(T / 8.0);
      end
    end
  end
  always @(posedge ph[0]) if (t_ph0 < 0.0) t_ph0 = $realtime;

  task automatic set_code(input int p);
    int j, r;
    j = p / 4; r = p % 4;
    if (j % 2 == 0) begin
      ca = 4'(1 << (j / 2)); cb = 4'(1 << (j / 2));
      d  = 4'((1 << r) - 1);
    end else begin
      cb = 4'(1 << ((j - 1) / 2)); ca = 4'(1 << (((j + 1) / 2) % 4));
      d  = 4'((1 << (4 - r)) - 1);
    end
  endtask

  initial begin
    realtime ph_err;
    int n;
    n = 0;
    forever begin
      @(posedge clk4[0]);
      t_p0 = $realtime;
      if (n >= 2) begin
        ph_err = (t_p0 - t_ph0) - real'(applied) * T / 32.0;
        while (ph_err > T / 2.0)  ph_err -= T;
        while (ph_err < -T / 2.0) ph_err += T;
        checks++;
        if (ph_err > 0.01 || ph_err < -0.01) begin
          failures++; $display("FAIL n=%0d pos=%0d error %f ps", n, applied, ph_err);
        end
      end
      // Next position.
      if (n < 40)       pos = (pos + 1) % 32;
      else if (n < 80)  pos = (pos + 31) % 32;
      else              pos = (pos + (($urandom & 1) ? 1 : 31)) % 32;
      #20;
      set_code(pos);
      @(posedge clk4[1]);
      checks++;
      if (($realtime - t_p0) - T / 4.0 > 0.01 || ($realtime - t_p0) - T / 4.0 < -0.01) begin
        failures++; $display("FAIL P1 offset %f", $realtime - t_p0);
      end
      // The code is sampled at mid-cycle: it applies to the next edge.
      applied = pos;
      n++;
      if (n == 300) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
