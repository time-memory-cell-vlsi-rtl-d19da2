`timescale 1ns/1ps
// p2s_timing_model: behavioural stand-in for the delay line that times the
// parallel-to-serial converter (an analog circuit locked to the clock).
//
// One clock period holds eleven bit times b = PERIOD/11. tap_start rises at
// the start of bit 0 and tap_d[i] at the start of bit i+1; each strobe stays
// high for half a period. `stop` is high from the start of bit 9 until half a
// bit before the next period. `clk` rises with tap_start. Output starts after
// one idle period.
module p2s_timing_model #(
  parameter realtime PERIOD = 50.0ns
) (
  output logic       clk,
  output logic       tap_start,
  output logic [7:0] tap_d,
  output logic       stop
);

  localparam realtime B = PERIOD / 11;

  initial begin
    clk = 1'b0;
    #(PERIOD);
    forever begin
      clk = 1'b1;
      #(PERIOD / 2);
      clk = 1'b0;
      #(PERIOD / 2);
    end
  end

  assign tap_start = clk;

  for (genvar i = 0; i < 8; i++) begin : g_tap
    logic t;
    initial begin
      t = 1'b0;
      #(PERIOD + (i + 1) * B);
      forever begin
        t = 1'b1;
        #(PERIOD / 2);
        t = 1'b0;
        #(PERIOD / 2);
      end
    end
    assign tap_d[i] = t;
  end

  initial begin
    stop = 1'b1;
    #(PERIOD - B / 2);
    forever begin
      stop = 1'b0;
      #(9.5 * B);
      stop = 1'b1;
      #(1.5 * B);
    end
  end

endmodule
