// p2s_converter: delay-line parallel-to-serial converter with NRZI coding.
//
// Eleven bit times make one clock period: a start bit, the eight data bits
// D0-D7 and two stop bits. The timing comes from a delay line locked to the
// clock (the same delay elements as the time memory smp), which delivers one
// strobe per start and data bit, `tap_start` and `tap_d[i]`, and a `stop`
// signal that is high during the two stop bit times. At its strobe, each flop
// takes its bit: the start flop a constant 1, data flop i the bit data[i].
// The serial output is the exclusive OR of all flop outputs, so it changes
// at every bit of value 1 and stays at every 0 (NRZI). During the stop bits
// the flops are cleared and the output is held low, so every period begins
// with a low-to-high change for the start bit.
//
// Interface: `data` must be stable from tap_start until stop rises. The bit
// rate is 11 times the clock frequency (220 Mb/s at 20 MHz).
//
// The structure (flops clocked sequentially along the delay line, XOR of
// their outputs, cleared by Stop, start bit, two stop bits, 11 bits per
// period, NRZI) follows the document; the polarity of the idle level is this
// design's reading of the output waveform.
module p2s_converter #(
  parameter int unsigned NDATA = 8
) (
  input  logic             tap_start,
  input  logic [NDATA-1:0] tap_d,
  input  logic             stop,
  input  logic [NDATA-1:0] data,
  output logic             serial_out
);

  logic             q_start;
  logic [NDATA-1:0] q;

  always_ff @(posedge tap_start or posedge stop) begin
    if (stop) q_start <= 1'b0;
    else      q_start <= 1'b1;
  end

  for (genvar i = 0; i < NDATA; i++) begin : g_bit
    logic smp;
    always_ff @(posedge tap_d[i] or posedge stop) begin
      if (stop) smp <= 1'b0;
      else      smp <= data[i];
    end
    assign q[i] = smp;
  end

  assign serial_out = (q_start ^ (^q)) && !stop;

endmodule
