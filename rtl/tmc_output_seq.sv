// tmc_output_seq: output sequencer and output control.
//
// Moves events from the channels' readout FIFOs to the 12-bit data port D0-11.
// Each event leaves as channel 0's wcount+1 words (header, then data), then
// channel 1's, and so on; a counter of the words taken from the current
// channel decides when to move on. One word at a time is held in the output
// register: DVALID* is low while it is valid, CH0 gives bit 0 of its channel
// number and EVEND* is low with the last word of an event.
//
// The reader takes the word with a read strobe, after which the next word is
// loaded. SYNCMOD selects the strobe: with SYNCMOD high a rising edge of OCLK
// while RE* is low; with SYNCMOD low a rising edge of RE* (the end of a read
// pulse). RE* and OCLK are brought into the clk domain through two flops each,
// so they must be slower than clk; a word is presented two to three clocks
// after its strobe's predecessor.
// ORUN is high while an event is being output; EMPFLG* is low when there is
// nothing to output. Output control: OE* low enables D0-5, D6-11, CH0 and
// CHP0-3 (the chip identifier CID0-3); with UBYTE high the upper six bits are
// put on D0-5 and D6-11 are not driven.
//
// The pins and the counter come from the chip's block diagram; the handshake,
// the channel order, SYNCMOD and UBYTE behaviour are this design's choices.
module tmc_output_seq
  import tmc_pkg::*;
#(
  parameter int unsigned NCH = 2,
  localparam int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [7:0]                 wcount,
  // readout FIFOs
  input  logic [NCH-1:0]             rf_empty,
  input  logic [NCH-1:0][WORD_W-1:0] rf_rdata,
  output logic [NCH-1:0]             rf_pop,
  // read handshake
  input  logic                       syncmod,
  input  logic                       re_n,
  input  logic                       oclk,
  output logic                       dvalid_n,
  output logic                       evend_n,
  output logic                       empflg_n,
  output logic                       orun,
  // output control
  input  logic                       oe_n,
  input  logic                       ubyte,
  input  logic [3:0]                 cid,
  output logic [WORD_W-1:0]          d_out,
  output logic [WORD_W-1:0]          d_oe,
  output logic                       ch0_out,
  output logic                       ch0_oe,
  output logic [3:0]                 chp,
  output logic                       chp_oe
);

  logic [2:0]        re_s, oclk_s;     // synchronisers plus previous value
  logic              strobe;
  logic [CHW-1:0]    cur_ch, out_ch;
  logic [7:0]        taken;
  logic              have, out_last;
  logic [WORD_W-1:0] out_word;
  logic              load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      re_s   <= '1;
      oclk_s <= '0;
    end else begin
      re_s   <= {re_s[1:0], re_n};
      oclk_s <= {oclk_s[1:0], oclk};
    end
  end

  assign strobe = syncmod ? (oclk_s[1] && !oclk_s[2] && !re_s[1])
                          : (re_s[1] && !re_s[2]);

  assign load = !have && !rf_empty[cur_ch];

  always_comb begin
    rf_pop = '0;
    rf_pop[cur_ch] = load;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_ch   <= '0;
      out_ch   <= '0;
      taken    <= '0;
      have     <= 1'b0;
      out_last <= 1'b0;
      out_word <= '0;
    end else begin
      if (have && strobe) have <= 1'b0;
      if (load) begin
        have     <= 1'b1;
        out_word <= rf_rdata[cur_ch];
        out_ch   <= cur_ch;
        out_last <= (taken == wcount) && (cur_ch == CHW'(NCH - 1));
        if (taken == wcount) begin
          taken  <= '0;
          cur_ch <= (cur_ch == CHW'(NCH - 1)) ? '0 : cur_ch + 1'b1;
        end else begin
          taken  <= taken + 1'b1;
        end
      end
    end
  end

  assign dvalid_n = !have;
  assign evend_n  = !(have && out_last);
  assign orun     = have || (taken != 0) || (cur_ch != 0) || !(&rf_empty);
  assign empflg_n = have || !(&rf_empty);

  // output control
  always_comb begin
    if (ubyte) begin
      d_out = {6'b0, out_word[WORD_W-1:CODE_W]};
      d_oe  = {{CODE_W{1'b0}}, {CODE_W{!oe_n}}};
    end else begin
      d_out = out_word;
      d_oe  = {WORD_W{!oe_n}};
    end
  end
  assign ch0_out = out_ch[0];
  assign ch0_oe  = !oe_n;
  assign chp     = cid;
  assign chp_oe  = !oe_n;

endmodule
