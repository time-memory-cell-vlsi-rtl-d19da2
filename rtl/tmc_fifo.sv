// tmc_fifo: synchronous first-in first-out buffer.
//
// Used twice in the chip: as the 128-word readout FIFO of each channel and as
// the 8-bit x 5-word trigger FIFO holding event positions. DEPTH need not be a
// power of two. A push when full and a pop when empty are ignored. `rdata`
// shows the oldest word whenever `empty` is low (first-word fall-through);
// `count` is the number of words held.
//
// Depths follow the document; the fall-through interface and the behaviour on
// full and empty are this design's choices.
module tmc_fifo #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 12,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

endmodule
