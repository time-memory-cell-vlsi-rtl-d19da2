// tmc_write_seq: write sequencer and write pointer.
//
// Writing of the level-1 ring buffers starts at the first clock edge at which
// WSTART is seen high and then runs until reset: WRUN is high, the memories
// are written every clock at `wptr`, and `wptr` advances by one per clock,
// wrapping around the memory depth. Each memory address therefore holds the
// encoded input of one clock period, and is overwritten DEPTH clocks later.
//
// The write sequencer, write pointer and the WSTART and WRUN pins follow the
// chip's block diagram; starting on a WSTART level and running until reset
// are this design's choices.
module tmc_write_seq #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wstart,
  output logic          wrun,
  output logic [AW-1:0] wptr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wrun <= 1'b0;
      wptr <= '0;
    end else begin
      if (wstart) wrun <= 1'b1;
      if (wrun)   wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
    end
  end

endmodule
