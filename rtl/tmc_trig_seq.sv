// tmc_trig_seq: trigger sequencer.
//
// A trigger is a rising edge of TRIG, seen at a clock edge. At that edge the
// event position, write pointer minus the offset register, is pushed into the
// trigger FIFO, and TRIGOUT pulses for one clock to acknowledge it. The
// position is the memory address holding the input from `offset` clock
// periods before the trigger reached the chip; the readout starts there.
// A trigger is refused, and an error flag pulses, when the trigger FIFO is
// full (more pending triggers than it holds) or when writing has not started.
//
// The offset subtraction into the trigger FIFO follows the chip's block
// diagram and the text (the FIFO stores the event position); edge
// triggering, TRIGOUT as an acknowledge and the error conditions are this
// design's choices.
module tmc_trig_seq #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          trig,
  input  logic          wrun,
  input  logic [AW-1:0] wptr,
  input  logic [AW-1:0] offset,
  input  logic          tfifo_full,
  output logic          tfifo_push,
  output logic [AW-1:0] tfifo_pos,
  output logic          trigout,
  output logic          err_ovf,
  output logic          err_idle
);

  logic trig_q, trig_edge;

  assign trig_edge  = trig && !trig_q;
  assign tfifo_push = trig_edge && wrun && !tfifo_full;
  assign tfifo_pos  = AW'((DEPTH + int'(wptr) - int'(offset)) % DEPTH);
  assign err_ovf    = trig_edge && wrun && tfifo_full;
  assign err_idle   = trig_edge && !wrun;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q  <= 1'b0;
      trigout <= 1'b0;
    end else begin
      trig_q  <= trig;
      trigout <= tfifo_push;
    end
  end

endmodule
