`timescale 1ns/1ps
// tb_tmc_readout_seq: surrounds the readout sequencer with models of the
// trigger FIFO, the two ring buffers (synchronous read) and the readout FIFO
// fill levels, and checks every word pushed into the readout FIFOs against
// the header-plus-window stream expected for each popped event position. It
// also checks the stall on a nearly full readout FIFO, the wait for a word
// not yet written, the clock count of back-to-back events and wrap-around of
// the read pointer.
module tb_tmc_readout_seq;
  import tmc_pkg::*;
  localparam int NCH = 2, D = 256, RD = 128;

  logic                       clk = 1'b0, rst_n = 1'b0;
  logic                       tf_empty, tf_pop;
  logic [7:0]                 tf_pos;
  logic [7:0]                 wcount = 8'd4;
  logic                       wrun = 1'b1;
  logic [7:0]                 wptr = '0;
  logic                       re;
  logic [7:0]                 radr;
  logic [NCH-1:0][WORD_W-1:0] rdata = '0;
  logic [NCH-1:0][7:0]        rf_count = '0;
  logic                       rf_push;
  logic [NCH-1:0][WORD_W-1:0] rf_wdata;
  logic                       rrun, stall;
  logic [EVNO_W-1:0]          evno;

  tmc_readout_seq #(.NCH(NCH), .DPM_DEPTH(D), .RFIFO_DEPTH(RD)) dut (.*);

  always #5 clk = ~clk;

  logic [WORD_W-1:0] mem [NCH][D];
  logic [7:0]        tq[$];
  logic [WORD_W-1:0] expq [NCH][$];
  int                checks = 0, failures = 0;
  int                evno_m = 0, stalls = 0, waits = 0, pops = 0;
  int                last_wc = 0, last_pop = -100, cyc = 0, spacing_seen = 0;
  bit                drain = 1'b1, freeze_wptr = 1'b0;

  // trigger FIFO model outputs, refreshed every nanosecond
  always begin
    tf_empty = (tq.size() == 0);
    tf_pos   = (tq.size() == 0) ? 8'h00 : tq[0];
    #1;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at clock %0d", what, cyc); end
  endtask

  // observe the combinational outputs before each edge, then model the edge
  always @(negedge clk) if (rst_n) begin
    #4;
    if (tf_pop) begin
      chk(!stall, "no stall while popping");
      for (int c = 0; c < NCH; c++) begin
        expq[c].push_back(WORD_W'(evno_m));
        for (int i = 0; i < int'(wcount); i++) expq[c].push_back(mem[c][(int'(tq[0]) + i) % D]);
      end
      evno_m++;
      if (wcount != 0 && cyc - last_pop == int'(wcount) + 3) spacing_seen++;
      chk(cyc - last_pop >= ((last_wc == 0) ? 2 : last_wc + 3), "events at least wcount+3 clocks apart");
      last_wc = int'(wcount);
      last_pop = cyc;
      pops++;
    end
    if (stall) stalls++;
    if (rrun && !re && !rf_push && wrun && radr == wptr) waits++;
    if (re) chk(!wrun || radr != wptr, "never read the word being written");
    if (rf_push) begin
      for (int c = 0; c < NCH; c++) begin
        chk(expq[c].size() != 0, "push expected");
        if (expq[c].size() != 0) begin
          chk(rf_wdata[c] === expq[c][0], $sformatf("channel %0d word %h expected %h", c, rf_wdata[c], expq[c][0]));
          void'(expq[c].pop_front());
        end
        chk(rf_count[c] != 8'(RD), "no push into a full FIFO");
      end
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tf_pop) void'(tq.pop_front());
    if (re) for (int c = 0; c < NCH; c++) rdata[c] <= mem[c][radr];
    if (wrun && !freeze_wptr) wptr <= wptr + 1'b1;
    for (int c = 0; c < NCH; c++)
      rf_count[c] <= rf_count[c] + 8'(rf_push) - 8'(drain && rf_count[c] != 0 && $urandom_range(0, 1) == 1);
  end

  task automatic wait_idle();
    while (tq.size() != 0 || rrun) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) for (int a = 0; a < D; a++) mem[c][a] = 12'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // single events, window in the past
    repeat (10) begin
      @(negedge clk); tq.push_back(wptr - 8'd40);
      repeat (15) @(negedge clk);
    end
    // back-to-back events, one wrapping round the end of the memory
    tq.push_back(8'd250); tq.push_back(8'd3); tq.push_back(8'd100);
    wait_idle();
    // header only
    wcount = 8'd0;
    tq.push_back(8'd7); tq.push_back(8'd8);
    wait_idle();
    // readout FIFOs nearly full: the sequencer must stall
    wcount = 8'd30;
    drain = 1'b0;
    repeat (6) tq.push_back(8'($urandom));
    repeat (300) @(negedge clk);
    chk(stalls > 0, "stall happened");
    chk(tq.size() != 0, "events wait while stalled");
    drain = 1'b1;
    wait_idle();
    // window reaching the write pointer: the read waits for the write
    wcount = 8'd10;
    freeze_wptr = 1'b1;
    @(negedge clk); tq.push_back(wptr - 8'd3);
    repeat (20) @(negedge clk);
    chk(waits > 0, "read waited for an unwritten word");
    freeze_wptr = 1'b0;
    wait_idle();
    chk(pops == 22, $sformatf("all events read (%0d)", pops));
    chk(spacing_seen > 0, "back-to-back events wcount+3 clocks apart");
    chk(int'(evno) == evno_m, "event number");
    for (int c = 0; c < NCH; c++) chk(expq[c].size() == 0, "all expected words pushed");
    $display("stalls=%0d waits=%0d", stalls, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
