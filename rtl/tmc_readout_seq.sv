// tmc_readout_seq: readout sequencer, read pointer and event number counter.
//
// While the trigger FIFO holds an event position, the sequencer copies that
// event from the ring buffers of all channels into their readout FIFOs: first
// one header word carrying the 12-bit event number, then `wcount` memory
// words starting at the event position. All channels are read at the same
// address in lockstep. An event is started only when every readout FIFO has
// room for all of its wcount+1 words; until then the sequencer stalls
// (`stall` high) and the event waits in the trigger FIFO. A memory word is
// read only after it has been written (read pointer different from write
// pointer), so a window reaching past the trigger waits for its data.
// The event number counts the events read out since reset.
//
// Timing: the header is pushed in the clock the event position is popped;
// memory reads are synchronous and each word is pushed one clock after its
// read. Back-to-back events start wcount+3 clocks apart (2 with wcount 0)
// when nothing stalls. RRUN is high while an event is being copied.
//
// From the document: the trigger FIFO gives the event position from which the
// data are read out and moved to the readout FIFO; the read pointer, event
// number counter and word-count counter appear in the block diagram. The
// header word, the lockstep read and the stall rule are this design's choices.
// wcount must not exceed the readout FIFO depth minus one.
// The reset also disables the overflow assertion at the clock edge, so lint
// sees it used both synchronously and asynchronously; only the flops use it
// as a reset.
module tmc_readout_seq
  import tmc_pkg::*;
#(
  parameter int unsigned NCH         = 2,
  parameter int unsigned DPM_DEPTH   = 256,
  parameter int unsigned RFIFO_DEPTH = 128,
  localparam int unsigned AW  = $clog2(DPM_DEPTH),
  localparam int unsigned RCW = $clog2(RFIFO_DEPTH + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // trigger FIFO
  input  logic                       tf_empty,
  input  logic [AW-1:0]              tf_pos,
  output logic                       tf_pop,
  // settings and write side
  input  logic [7:0]                 wcount,
  input  logic                       wrun,
  input  logic [AW-1:0]              wptr,
  // ring buffers
  output logic                       re,
  output logic [AW-1:0]              radr,
  input  logic [NCH-1:0][WORD_W-1:0] rdata,
  // readout FIFOs
  input  logic [NCH-1:0][RCW-1:0]    rf_count,
  output logic                       rf_push,
  output logic [NCH-1:0][WORD_W-1:0] rf_wdata,
  // status
  output logic                       rrun,
  output logic                       stall,
  output logic [EVNO_W-1:0]          evno
);

  typedef enum logic {S_IDLE, S_READ} state_e;
  state_e        st;
  logic [AW-1:0] rptr;
  logic [7:0]    left;
  logic          rd_v;
  logic          space_ok, avail;

  always_comb begin
    space_ok = 1'b1;
    for (int c = 0; c < NCH; c++) begin
      if (int'(RFIFO_DEPTH) - int'(rf_count[c]) < int'(wcount) + 1) space_ok = 1'b0;
    end
  end

  assign avail   = !wrun || (rptr != wptr);
  assign tf_pop  = (st == S_IDLE) && !tf_empty && space_ok;
  assign stall   = (st == S_IDLE) && !tf_empty && !space_ok;
  assign re      = (st == S_READ) && (left != 0) && avail;
  assign radr    = rptr;
  assign rf_push = tf_pop || rd_v;
  assign rrun    = (st == S_READ);

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      rf_wdata[c] = rd_v ? rdata[c] : WORD_W'(evno);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      rptr <= '0;
      left <= '0;
      rd_v <= 1'b0;
      evno <= '0;
    end else begin
      rd_v <= re;
      unique case (st)
        S_IDLE: begin
          if (tf_pop) begin
            st   <= S_READ;
            rptr <= tf_pos;
            left <= wcount;
          end
        end
        S_READ: begin
          if (re) begin
            rptr <= (rptr == AW'(DPM_DEPTH - 1)) ? '0 : rptr + 1'b1;
            left <= left - 1'b1;
          end else if (left == 0 && !rd_v) begin
            st   <= S_IDLE;
            evno <= evno + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // A word is never pushed into a full readout FIFO.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    rf_push |-> (rf_count[0] != RCW'(RFIFO_DEPTH)));

endmodule
