`timescale 1ns/1ps
// tb_tmc_output_seq: feeds the output sequencer from two readout FIFO models
// holding whole events and reads them out as a host would, first with the
// RE* pulse handshake (SYNCMOD low), then with OCLK while RE* is low (SYNCMOD
// high). Every word, its channel bit and EVEND* are compared with the order
// the events were stored in; OE*, UBYTE, CHP0-3, EMPFLG* and ORUN are checked
// on the way.
module tb_tmc_output_seq;
  import tmc_pkg::*;
  localparam int NCH = 2;

  logic                       clk = 1'b0, rst_n = 1'b0;
  logic [7:0]                 wcount = 8'd3;
  logic [NCH-1:0]             rf_empty;
  logic [NCH-1:0][WORD_W-1:0] rf_rdata;
  logic [NCH-1:0]             rf_pop;
  logic                       syncmod = 1'b0, re_n = 1'b1, oclk = 1'b0;
  logic                       dvalid_n, evend_n, empflg_n, orun;
  logic                       oe_n = 1'b0, ubyte = 1'b0;
  logic [3:0]                 cid = 4'hA;
  logic [WORD_W-1:0]          d_out, d_oe;
  logic                       ch0_out, ch0_oe;
  logic [3:0]                 chp;
  logic                       chp_oe;

  tmc_output_seq #(.NCH(NCH)) dut (.*);

  always #5 clk = ~clk;

  logic [WORD_W-1:0] fq [NCH][$];
  typedef struct { logic [WORD_W-1:0] w; int ch; bit last; } exp_t;
  exp_t  eq[$];
  int    checks = 0, failures = 0, words_async = 0, words_sync = 0, words_ubyte = 0;

  always begin
    for (int c = 0; c < NCH; c++) begin
      rf_empty[c] = (fq[c].size() == 0);
      rf_rdata[c] = (fq[c].size() == 0) ? '0 : fq[c][0];
    end
    #1;
  end

  always @(posedge clk) for (int c = 0; c < NCH; c++) if (rf_pop[c]) void'(fq[c].pop_front());

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic add_event(int n);
    for (int c = 0; c < NCH; c++) begin
      for (int i = 0; i <= int'(wcount); i++) begin
        exp_t e;
        e.w = (i == 0) ? WORD_W'(n) : 12'($urandom);
        e.ch = c;
        e.last = (c == NCH - 1) && (i == int'(wcount));
        fq[c].push_back(e.w);
        eq.push_back(e);
      end
    end
  endtask

  task automatic check_word();
    exp_t e = eq.pop_front();
    #1;
    if (ubyte) begin
      chk(d_out[5:0] == e.w[11:6] && d_oe == 12'h03F, $sformatf("upper byte %h of %h", d_out, e.w));
      words_ubyte++;
    end else begin
      chk(d_out == e.w && d_oe == 12'hFFF, $sformatf("word %h expected %h", d_out, e.w));
    end
    chk(ch0_out == e.ch[0] && ch0_oe && chp == cid && chp_oe, "channel and chip id");
    chk(evend_n == !e.last, "EVEND* on the last word only");
    chk(orun, "ORUN while outputting");
  endtask

  task automatic wait_valid();
    int n = 0;
    while (dvalid_n && n < 100) begin @(negedge clk); n++; end
    chk(!dvalid_n, "DVALID* comes");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    chk(!empflg_n && dvalid_n && !orun, "empty at start");
    for (int n = 0; n < 4; n++) add_event(n);
    // RE* pulses
    while (eq.size() != 0) begin
      wait_valid();
      ubyte = (eq.size() % 7 == 3);
      check_word();
      words_async++;
      @(negedge clk); re_n = 1'b0;
      repeat (3) @(negedge clk);
      chk(!dvalid_n, "word held until RE* rises");
      re_n = 1'b1;
      repeat (3) @(negedge clk);
    end
    ubyte = 1'b0;
    repeat (5) @(negedge clk);
    chk(!empflg_n && !orun && dvalid_n, "empty after the events");
    // OCLK with RE* high takes nothing
    wcount = 8'd5;
    syncmod = 1'b1;
    add_event(9);
    wait_valid();
    repeat (4) begin
      oclk = 1'b1; repeat (3) @(negedge clk);
      oclk = 1'b0; repeat (3) @(negedge clk);
    end
    chk(!dvalid_n && d_out == eq[0].w, "OCLK ignored while RE* high");
    // OCLK with RE* low
    re_n = 1'b0;
    add_event(10);
    chk(empflg_n, "EMPFLG* high with data waiting");
    while (eq.size() != 0) begin
      wait_valid();
      check_word();
      words_sync++;
      oclk = 1'b1; repeat (3) @(negedge clk);
      oclk = 1'b0; repeat (3) @(negedge clk);
    end
    // output disabled
    oe_n = 1'b1;
    #1 chk(d_oe == '0 && !ch0_oe && !chp_oe, "OE* high disables the outputs");
    chk(words_async == 32 && words_sync == 24 && words_ubyte > 0, "all words taken in both modes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
