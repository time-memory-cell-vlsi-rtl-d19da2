`timescale 1ns/1ps
// tmc_phase_model: behavioural stand-in for the phase-locked asymmetric ring
// oscillator that times the time memory cell (an analog circuit).
//
// It produces the system clock and NTAPS timing signals of the same period,
// tap i rising (i + 1/2) * PERIOD/NTAPS after each rising clock edge, i.e. the
// ideal output of an oscillator locked to the clock with equally spaced
// stages. Clock and taps start after one idle period, so that processes
// started at time zero see the first rising clock edge.
module tmc_phase_model #(
  parameter realtime PERIOD = 25.0ns,
  parameter int      NTAPS  = 32
) (
  output logic             clk,
  output logic [NTAPS-1:0] tap
);

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

  for (genvar i = 0; i < NTAPS; i++) begin : g_tap
    logic t;
    initial begin
      t = 1'b0;
      #(PERIOD + (i + 0.5) * PERIOD / NTAPS);
      forever begin
        t = 1'b1;
        #(PERIOD / 2);
        t = 1'b0;
        #(PERIOD / 2);
      end
    end
    assign tap[i] = t;
  end

endmodule
