// tmc_channel: one channel of the time digitizer with its level-1 buffer.
//
// The calibration multiplexer selects CALIN instead of the hit input when
// CALEN is high. The time memory cell samples the selected signal at the 32
// taps of the channel's ring oscillator; two encoders reduce the first and
// second half of the 32 samples to one 6-bit code each. The two codes form a
// 12-bit word ({second half, first half}) that is written into the ring
// buffer every clock while `we` is high. The read port of the ring buffer and
// the channel's readout FIFO are driven by the shared sequencers.
//
// Timing: the input of the clock period starting at clk edge n is written to
// the ring buffer at edge n+2, at the address `wadr` holds then.
//
// The chain MUX - TMC - two 16-bit encoders - 256-word dual-port memory -
// 128-word readout FIFO follows the chip's block diagram.
// The readout FIFO's full flag is left open: the readout sequencer checks
// the fill level before it starts an event, so a push never meets a full FIFO.
module tmc_channel
  import tmc_pkg::*;
#(
  parameter int unsigned DPM_DEPTH   = 256,
  parameter int unsigned RFIFO_DEPTH = 128,
  localparam int unsigned AW  = $clog2(DPM_DEPTH),
  localparam int unsigned RCW = $clog2(RFIFO_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NTAPS-1:0]  tap,
  input  logic              tin,
  input  logic              calin,
  input  logic              calen,
  // ring buffer
  input  logic              we,
  input  logic [AW-1:0]     wadr,
  input  logic              re,
  input  logic [AW-1:0]     radr,
  output logic [WORD_W-1:0] rdata,
  // readout FIFO
  input  logic              rf_push,
  input  logic [WORD_W-1:0] rf_wdata,
  input  logic              rf_pop,
  output logic [WORD_W-1:0] rf_rdata,
  output logic              rf_empty,
  output logic [RCW-1:0]    rf_count
);

  logic             hit_in;
  logic [NTAPS-1:0] samples;
  logic             prev_last;
  code_t            code0, code1;

  assign hit_in = calen ? calin : tin;

  tmc_latch u_tmc (
    .clk, .rst_n, .tap, .tin(hit_in), .samples, .prev_last
  );

  tmc_encoder u_enc0 (
    .samples(samples[ENC_BITS-1:0]), .prev(prev_last), .code(code0)
  );

  tmc_encoder u_enc1 (
    .samples(samples[NTAPS-1:ENC_BITS]), .prev(samples[ENC_BITS-1]), .code(code1)
  );

  tmc_dpm #(.DEPTH(DPM_DEPTH), .WIDTH(WORD_W)) u_dpm (
    .clk, .we, .wadr, .wdata({code1, code0}), .re, .radr, .rdata
  );

  tmc_fifo #(.DEPTH(RFIFO_DEPTH), .WIDTH(WORD_W)) u_rfifo (
    .clk, .rst_n, .push(rf_push), .wdata(rf_wdata), .pop(rf_pop),
    .rdata(rf_rdata), .empty(rf_empty), .full(), .count(rf_count)
  );

endmodule
