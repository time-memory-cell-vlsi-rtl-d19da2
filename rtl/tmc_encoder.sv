// tmc_encoder: encodes one half of the time memory cell's samples.
//
// The input is ENC_BITS samples in time order (bit 0 earliest) plus the
// sample taken just before them. The encoder finds the first sample that
// differs from the one before it, i.e. the first edge of the input inside
// this half period, and reports it as a 6-bit code: hit tag, edge polarity
// (1 = rising) and the index of that sample. With no edge the code is zero.
// Two encoders per channel, each covering half a period, let the chip record
// two edges per clock period, one in each half.
//
// Purely combinational. The 16-bit span, the two encoders and the 6-bit width
// follow the chip's block diagram; the choice of the first edge and the field
// layout are this design's own.
module tmc_encoder
  import tmc_pkg::*;
(
  input  logic [ENC_BITS-1:0] samples,
  input  logic                prev,     // sample before samples[0]
  output code_t               code
);

  logic [ENC_BITS-1:0] edges;

  always_comb begin
    edges = samples ^ {samples[ENC_BITS-2:0], prev};
    code  = '0;
    for (int i = ENC_BITS - 1; i >= 0; i--) begin
      if (edges[i]) begin
        code.hit  = 1'b1;
        code.rise = samples[i];
        code.pos  = POS_W'(i);
      end
    end
  end

endmodule
