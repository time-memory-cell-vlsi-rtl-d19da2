// tmc_top: the two designs side by side.
//
// u_tmc is the TMC-TEG5 pipeline time-to-digital converter chip (two channels,
// 256-word level-1 buffers, trigger and readout FIFOs, CSR port); its pins are
// brought out unchanged. u_p2s is the delay-line parallel-to-serial converter
// with NRZI output, whose pins carry the prefix ps_. The two share nothing:
// the converter is a separate test circuit built from the same delay elements
// as the time memory cell. The analog parts (phase-locked ring oscillators,
// delay lines, input receivers and output drivers) are outside: their timing
// signals come in as tap, ps_tap_start, ps_tap_d and ps_stop.
module tmc_top
  import tmc_pkg::*;
#(
  parameter int unsigned NCH         = 2,
  parameter int unsigned DPM_DEPTH   = 256,
  parameter int unsigned RFIFO_DEPTH = 128,
  parameter int unsigned TFIFO_DEPTH = 5
) (
  // TMC-TEG5
  input  logic                      clk,
  input  logic                      rst1_n,
  input  logic                      rst2_n,
  input  logic                      enosc,
  input  logic                      tclken,
  input  logic                      div4,
  output logic                      oscout,
  output logic                      pll_enosc,
  output logic                      pll_div4,
  input  logic [NCH-1:0][NTAPS-1:0] tap,
  input  logic [NCH-1:0]            tin,
  input  logic                      calin,
  input  logic                      calen,
  input  logic                      wstart,
  output logic                      wrun,
  input  logic                      trig,
  output logic                      trigout,
  output logic                      rrun,
  input  logic [CSR_AW-1:0]         ra,
  input  logic                      wr_n,
  input  logic                      cs_n,
  input  logic [CSR_W-1:0]          cio_in,
  output logic [CSR_W-1:0]          cio_out,
  output logic                      cio_oe,
  output logic                      err_n,
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
  output logic                      rstall,
  // parallel-to-serial converter
  input  logic                      ps_tap_start,
  input  logic [7:0]                ps_tap_d,
  input  logic                      ps_stop,
  input  logic [7:0]                ps_data,
  output logic                      ps_serial_out
);

  tmc_teg5 #(
    .NCH(NCH), .DPM_DEPTH(DPM_DEPTH), .RFIFO_DEPTH(RFIFO_DEPTH), .TFIFO_DEPTH(TFIFO_DEPTH)
  ) u_tmc (
    .clk, .rst1_n, .rst2_n, .enosc, .tclken, .div4, .oscout, .pll_enosc, .pll_div4,
    .tap, .tin, .calin, .calen, .wstart, .wrun, .trig, .trigout, .rrun,
    .ra, .wr_n, .cs_n, .cio_in, .cio_out, .cio_oe, .err_n,
    .syncmod, .re_n, .oclk, .oe_n, .ubyte, .cid, .orun, .dvalid_n, .evend_n,
    .empflg_n, .d_out, .d_oe, .ch0_out, .ch0_oe, .chp, .chp_oe, .rstall
  );

  p2s_converter #(.NDATA(8)) u_p2s (
    .tap_start(ps_tap_start), .tap_d(ps_tap_d), .stop(ps_stop),
    .data(ps_data), .serial_out(ps_serial_out)
  );

endmodule
