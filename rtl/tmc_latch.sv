// tmc_latch: the time memory smp proper. It turns one hit input into a
// 32-bit picture of that input across each clock period.
//
// Each of the NTAPS sample flops is clocked by one timing signal of the
// phase-locked asymmetric ring oscillator. The oscillator's taps are equally
// spaced by T/NTAPS, so the flops hold the input level at NTAPS equally spaced
// instants of the period. At the next rising edge of clk the whole set is
// copied into `samples`, bit i being the level seen by tap i. `prev_last`
// holds bit NTAPS-1 of the word before, so that an edge falling between two
// clock periods can still be found by the encoder.
//
// Timing: taps must fire strictly inside the period, i.e. tap i rises at
// (i + 1/2) * T/NTAPS after the clk rising edge, so that none coincides with
// clk. The input sampled during the period that starts at clk edge n appears
// on `samples` after edge n+1.
//
// The document gives the sampling principle (32 taps, T/32 spacing); the
// retiming register and the tap placement are this design's choices.
module tmc_latch
  import tmc_pkg::*;
#(
  parameter int unsigned TAPS = NTAPS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TAPS-1:0] tap,        // timing signals of the oscillator
  input  logic            tin,        // hit input
  output logic [TAPS-1:0] samples,    // input level at each tap, last period
  output logic            prev_last   // samples[TAPS-1] of the period before
);

  logic [TAPS-1:0] lat;

  for (genvar i = 0; i < TAPS; i++) begin : g_cell
    logic smp;
    always_ff @(posedge tap[i]) smp <= tin;
    assign lat[i] = smp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samples   <= '0;
      prev_last <= 1'b0;
    end else begin
      samples   <= lat;
      prev_last <= samples[TAPS-1];
    end
  end

endmodule
