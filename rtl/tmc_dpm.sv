// tmc_dpm: dual-port memory used as the level-1 ring buffer of one channel.
//
// One write port and one read port on the same clock. The write side stores
// the encoded word of every clock period at `wadr` while `we` is high; the
// read side returns the word at `radr` one clock after `re`. A read of the
// address being written in the same clock returns the old word.
//
// The depth (256 words) follows the document; the word width follows the two
// 6-bit encoder codes. The synchronous read port is this design's choice.
module tmc_dpm #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 12,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    wadr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    radr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wadr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[radr];
  end

endmodule
