// tmc_teg5: the TMC-TEG5 pipeline time-to-digital converter chip.
//
// NCH channels digitise the time of the edges of their hit inputs with 1/32
// of the clock period as the step and write one 12-bit word per clock into a
// DPM_DEPTH-word ring buffer, which keeps the last DPM_DEPTH clock periods of
// each input (6.4 us at 40 MHz) while the trigger decision is made. A trigger
// pushes the event position (write pointer minus the CSR0 offset) into a
// TFIFO_DEPTH-deep trigger FIFO, so that several triggers in quick succession
// are accepted without dead time. The readout sequencer copies each event
// (event-number header plus CSR4 words per channel) into the channels'
// RFIFO_DEPTH-word readout FIFOs, and the output sequencer hands the words out
// on D0-11 with a DVALID*/RE* handshake. An 8-bit CSR port sets and reads the
// registers.
//
// The phase-locked ring oscillators are analog and sit outside this module:
// each channel's 32 timing signals come in on `tap`, and ENOSC and DIV4 leave
// towards them. Bidirectional and three-state pins appear as separate in, out
// and output-enable signals. Pin names are those of the chip; an asterisk
// (active low) is written _n.
//
// Channel count, memory depths, FIFO sizes and the block structure follow the
// document; the data formats, register map, handshakes and reset split are
// this design's own (see the submodules).
module tmc_teg5
  import tmc_pkg::*;
#(
  parameter int unsigned NCH         = 2,
  parameter int unsigned DPM_DEPTH   = 256,
  parameter int unsigned RFIFO_DEPTH = 128,
  parameter int unsigned TFIFO_DEPTH = 5,
  localparam int unsigned AW  = $clog2(DPM_DEPTH),
  localparam int unsigned RCW = $clog2(RFIFO_DEPTH + 1)
) (
  // clock and misc
  input  logic                      clk,
  input  logic                      rst1_n,
  input  logic                      rst2_n,
  input  logic                      enosc,
  input  logic                      tclken,
  input  logic                      div4,
  output logic                      oscout,
  output logic                      pll_enosc,
  output logic                      pll_div4,
  // time inputs
  input  logic [NCH-1:0][NTAPS-1:0] tap,
  input  logic [NCH-1:0]            tin,
  input  logic                      calin,
  input  logic                      calen,
  // sequencers
  input  logic                      wstart,
  output logic                      wrun,
  input  logic                      trig,
  output logic                      trigout,
  output logic                      rrun,
  // CSR port
  input  logic [CSR_AW-1:0]         ra,
  input  logic                      wr_n,
  input  logic                      cs_n,
  input  logic [CSR_W-1:0]          cio_in,
  output logic [CSR_W-1:0]          cio_out,
  output logic                      cio_oe,
  output logic                      err_n,
  // output port
  input  logic                      syncmod,
  input  logic                      re_n,
  input  logic                      oclk,
  input  logic                      oe_n,
  input  logic                      ubyte,
  input  logic [3:0]                cid,
  output logic                      orun,
  output logic                      dvalid_n,
  output logic                      evend_n,
  output logic                      empflg_n,
  output logic [WORD_W-1:0]         d_out,
  output logic [WORD_W-1:0]         d_oe,
  output logic                      ch0_out,
  output logic                      ch0_oe,
  output logic [3:0]                chp,
  output logic                      chp_oe,
  // observation of the readout stall, for test
  output logic                      rstall
);

  localparam int unsigned TCW = $clog2(TFIFO_DEPTH + 1);

  logic                       rst_all_n, rst_dp_n;
  logic [AW-1:0]              wptr, offset8, tf_wpos, tf_rpos, radr;
  logic [7:0]                 offset, wcount;
  logic                       tf_push, tf_pop, tf_empty, tf_full;
  logic [TCW-1:0]             tf_count;
  logic                       err_ovf, err_idle;
  logic                       re, rf_push;
  logic [NCH-1:0][WORD_W-1:0] rdata, rf_wdata, rf_rdata;
  logic [NCH-1:0][RCW-1:0]    rf_count;
  logic [NCH-1:0]             rf_empty, rf_pop;
  logic [EVNO_W-1:0]          evno;
  logic [NERR-1:0]            err_set;

  always_comb begin
    err_set = '0;
    err_set[ERR_TFIFO_OVF] = err_ovf;
    err_set[ERR_TRIG_IDLE] = err_idle;
  end

  tmc_clock_misc u_clk (
    .clk, .rst1_n, .rst2_n, .enosc, .tclken, .div4, .osc_mon(tap[0][0]),
    .rst_all_n, .rst_dp_n, .oscout, .pll_enosc, .pll_div4
  );

  tmc_csr u_csr (
    .clk, .rst_n(rst_all_n), .cs_n, .wr_n, .ra, .cio_in, .cio_out, .cio_oe,
    .offset, .wcount,
    .rptr(8'(radr)), .wptr(8'(wptr)), .evno, .wrun, .rrun, .orun,
    .tcount(3'(tf_count)), .err_set(err_set), .err_n
  );

  tmc_write_seq #(.DEPTH(DPM_DEPTH)) u_wseq (
    .clk, .rst_n(rst_dp_n), .wstart, .wrun, .wptr
  );

  assign offset8 = AW'(offset);

  tmc_trig_seq #(.DEPTH(DPM_DEPTH)) u_tseq (
    .clk, .rst_n(rst_dp_n), .trig, .wrun, .wptr, .offset(offset8),
    .tfifo_full(tf_full), .tfifo_push(tf_push), .tfifo_pos(tf_wpos),
    .trigout, .err_ovf, .err_idle
  );

  tmc_fifo #(.DEPTH(TFIFO_DEPTH), .WIDTH(AW)) u_tfifo (
    .clk, .rst_n(rst_dp_n), .push(tf_push), .wdata(tf_wpos), .pop(tf_pop),
    .rdata(tf_rpos), .empty(tf_empty), .full(tf_full), .count(tf_count)
  );

  tmc_readout_seq #(.NCH(NCH), .DPM_DEPTH(DPM_DEPTH), .RFIFO_DEPTH(RFIFO_DEPTH)) u_rseq (
    .clk, .rst_n(rst_dp_n), .tf_empty, .tf_pos(tf_rpos), .tf_pop,
    .wcount, .wrun, .wptr, .re, .radr, .rdata,
    .rf_count, .rf_push, .rf_wdata, .rrun, .stall(rstall), .evno
  );

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    tmc_channel #(.DPM_DEPTH(DPM_DEPTH), .RFIFO_DEPTH(RFIFO_DEPTH)) u_ch (
      .clk, .rst_n(rst_dp_n), .tap(tap[c]), .tin(tin[c]), .calin, .calen,
      .we(wrun), .wadr(wptr), .re, .radr, .rdata(rdata[c]),
      .rf_push, .rf_wdata(rf_wdata[c]), .rf_pop(rf_pop[c]),
      .rf_rdata(rf_rdata[c]), .rf_empty(rf_empty[c]), .rf_count(rf_count[c])
    );
  end

  tmc_output_seq #(.NCH(NCH)) u_oseq (
    .clk, .rst_n(rst_dp_n), .wcount, .rf_empty, .rf_rdata, .rf_pop,
    .syncmod, .re_n, .oclk, .dvalid_n, .evend_n, .empflg_n, .orun,
    .oe_n, .ubyte, .cid, .d_out, .d_oe, .ch0_out, .ch0_oe, .chp, .chp_oe
  );

endmodule
