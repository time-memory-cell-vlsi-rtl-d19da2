`timescale 1ns/1ps
// tb_tmc_top: end-to-end test of the whole design at its default sizes
// (two channels, 256-word ring buffers, 128-word readout FIFOs, 5-deep
// trigger FIFO) with a 40 MHz clock, and of the serial converter at 20 MHz.
//
// Random edges are put on both hit inputs and, in one stretch with CALEN
// high, on the calibration input. The bench keeps the 32 samples it expects
// for every clock period and channel, and for each trigger it accepts it
// builds the words the chip must output: per channel the event number and
// the CSR4 words starting CSR0 periods before the trigger (a trigger seen at
// clock edge m selects periods m-2-offset onward). A host process reads the
// output port and compares every word, its channel bit and EVEND*.
//
// Mechanisms made to happen and counted: calibration input, two edges in one
// period, rising and falling edges, ring buffer wrap-around, five triggers
// pending in the trigger FIFO, trigger FIFO overflow with ERR*, trigger while
// writing is stopped, readout stall on full readout FIFOs, RE* and OCLK
// (SYNCMOD) readout, UBYTE, RST2* keeping the registers, and NRZI frames of
// the serial converter at 11 bits per clock period.
module tb_tmc_top;
  import tmc_pkg::*;
  import tmc_ref_pkg::*;

  localparam realtime T    = 25.0ns;
  localparam realtime STEP = T / NTAPS;
  localparam realtime TP   = 50.0ns;
  localparam realtime BP   = TP / 11;

  // TMC-TEG5 pins
  logic              clk, rst1_n = 1'b0, rst2_n = 1'b1, enosc = 1'b1, tclken = 1'b0, div4 = 1'b0;
  logic              oscout, pll_enosc, pll_div4;
  logic [NTAPS-1:0]  tap0;
  logic [1:0]        tin = '0;
  logic              calin = 1'b0, calen = 1'b0;
  logic              wstart = 1'b0, wrun, trig = 1'b0, trigout, rrun;
  logic [2:0]        ra = '0;
  logic              wr_n = 1'b1, cs_n = 1'b1;
  logic [7:0]        cio_in = '0, cio_out;
  logic              cio_oe, err_n;
  logic              syncmod = 1'b0, re_n = 1'b1, oclk = 1'b0, oe_n = 1'b0, ubyte = 1'b0;
  logic [3:0]        cid = 4'h9;
  logic              orun, dvalid_n, evend_n, empflg_n;
  logic [11:0]       d_out, d_oe;
  logic              ch0_out, ch0_oe, chp_oe, rstall;
  logic [3:0]        chp;
  // serial converter pins
  logic              pclk, ps_tap_start, ps_stop, ps_serial_out;
  logic [7:0]        ps_tap_d, ps_data = '0;

  tmc_phase_model #(.PERIOD(T), .NTAPS(NTAPS)) u_osc (.clk, .tap(tap0));
  p2s_timing_model #(.PERIOD(TP)) u_dl (.clk(pclk), .tap_start(ps_tap_start), .tap_d(ps_tap_d), .stop(ps_stop));

  tmc_top dut (
    .clk, .rst1_n, .rst2_n, .enosc, .tclken, .div4, .oscout, .pll_enosc, .pll_div4,
    .tap({tap0, tap0}), .tin, .calin, .calen, .wstart, .wrun, .trig, .trigout, .rrun,
    .ra, .wr_n, .cs_n, .cio_in, .cio_out, .cio_oe, .err_n,
    .syncmod, .re_n, .oclk, .oe_n, .ubyte, .cid, .orun, .dvalid_n, .evend_n, .empflg_n,
    .d_out, .d_oe, .ch0_out, .ch0_oe, .chp, .chp_oe, .rstall,
    .ps_tap_start, .ps_tap_d, .ps_stop, .ps_data, .ps_serial_out
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_cal = 0, n_two = 0, n_rise = 0, n_fall = 0, n_wrap = 0, n_five = 0, n_ovf = 0;
  int n_idle_err = 0, n_stall = 0, n_async = 0, n_sync = 0, n_ubyte = 0, n_rst2 = 0, n_frames = 0;
  int n_events = 0;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $realtime); end
  endtask

  initial begin
    #(T * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  logic [31:0] bits [2][0:4095];
  int          cyc = 0;
  bit          cal_phase = 1'b0, quiet = 1'b0;

  initial begin
    int   k[3][2];
    logic lv[3];
    lv = '{default: 1'b0};
    forever begin
      @(posedge clk); cyc++;
      calen = cal_phase;
      for (int s = 0; s < 3; s++)
        for (int j = 0; j < 2; j++)
          k[s][j] = (quiet || $urandom_range(0, 2) == 0) ? 99 : $urandom_range(0, 31);
      for (int i = 0; i < NTAPS; i++) begin
        for (int s = 0; s < 3; s++)
          for (int j = 0; j < 2; j++)
            if (k[s][j] == i) lv[s] = !lv[s];
        tin[0] = lv[0]; tin[1] = lv[1]; calin = lv[2];
        for (int c = 0; c < 2; c++) bits[c][cyc % 4096][i] = cal_phase ? lv[2] : lv[c];
        if (i != NTAPS - 1) #(STEP);
      end
    end
  end

  // ---------------------------------------------------------------- expected output
  typedef struct { logic [11:0] w; int ch; bit last; } exp_t;
  exp_t eq[$];
  int   offset_m = 16, wcount_m = 8, evno_m = 0, e0 = 0;

  function automatic logic [11:0] period_word(int c, int n);
    return ref_word(bits[c][n % 4096], bits[c][(n - 1) % 4096][31]);
  endfunction

  task automatic expect_event(int m);
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i <= wcount_m; i++) begin
        exp_t e;
        if (i == 0) e.w = 12'(evno_m);
        else begin
          int n = m - 2 - offset_m + i - 1;
          e.w = period_word(c, n);
          if (e.w[11] && e.w[5]) n_two++;
          if (e.w[11] && e.w[10] || e.w[5] && e.w[4]) n_rise++;
          if (e.w[11] && !e.w[10] || e.w[5] && !e.w[4]) n_fall++;
          if (((n / 60) % 2 == 1) && n >= cal_start && n < cal_end && (e.w[11] || e.w[5])) n_cal++;
        end
        e.ch = c;
        e.last = (c == 1) && (i == wcount_m);
        eq.push_back(e);
      end
    end
    evno_m++;
    n_events++;
    if (m - e0 > 300) n_wrap++;
  endtask
  int cal_start = 1 << 30, cal_end = 1 << 30;

  // ---------------------------------------------------------------- host side
  task automatic csr_wr(logic [2:0] a, logic [7:0] d);
    @(negedge clk); cs_n = 1'b0; wr_n = 1'b0; ra = a; cio_in = d;
    @(negedge clk); cs_n = 1'b1; wr_n = 1'b1;
    if (a == 3'd0) offset_m = int'(d);
    if (a == 3'd4) wcount_m = int'(d);
  endtask

  task automatic csr_rd(logic [2:0] a, output logic [7:0] d);
    @(negedge clk); cs_n = 1'b0; wr_n = 1'b1; ra = a;
    #1 d = cio_out;
    chk(cio_oe, "CIO driven during a read");
    @(negedge clk); cs_n = 1'b1;
  endtask

  // TRIG rises before clock edge m; returns m
  task automatic fire(bit exp_accept);
    int m;
    @(negedge clk); trig = 1'b1;
    @(negedge clk); trig = 1'b0; m = cyc;
    chk(trigout == exp_accept, $sformatf("TRIGOUT %0b for trigger at %0d", trigout, m));
    if (exp_accept) expect_event(m);
  endtask

  bit consume = 1'b0, idle_host = 1'b1;

  initial begin
    forever begin
      @(negedge clk);
      idle_host = 1'b1;
      if (!consume || dvalid_n) continue;
      idle_host = 1'b0;
      #1;
      if (eq.size() == 0) begin
        chk(1'b0, "word without an expected event");
      end else begin
        exp_t e;
        e = eq.pop_front();
        if (ubyte) begin
          chk(d_out[5:0] == e.w[11:6] && d_oe == 12'h03F, $sformatf("upper half %h of %h", d_out[5:0], e.w));
          n_ubyte++;
        end else begin
          chk(d_out == e.w && d_oe == 12'hFFF, $sformatf("word %h expected %h (ch %0d)", d_out, e.w, e.ch));
        end
        chk(ch0_out == e.ch[0] && chp == cid, "channel bit and chip id");
        chk(evend_n == !e.last, "EVEND*");
      end
      if (!syncmod) begin
        re_n = 1'b0; repeat (2) @(negedge clk);
        re_n = 1'b1; repeat (3) @(negedge clk);
        n_async++;
      end else begin
        oclk = 1'b1; repeat (2) @(negedge clk);
        oclk = 1'b0; repeat (2) @(negedge clk);
        n_sync++;
      end
    end
  end

  always @(posedge clk) begin
    if (rstall) n_stall++;
  end

  task automatic drain();
    int n = 0;
    while ((eq.size() != 0 || !idle_host) && n < 20000) begin @(negedge clk); n++; end
    repeat (10) @(negedge clk);
    chk(eq.size() == 0 && dvalid_n && !empflg_n, "all expected words read");
  endtask

  // ---------------------------------------------------------------- serial converter
  initial begin
    logic [7:0] d;
    logic       lvl;
    bit         ok;
    @(posedge pclk);
    repeat (200) begin
      d = 8'($urandom);
      ps_data = d;
      @(posedge pclk);
      ok = 1'b1;
      lvl = 1'b1;
      #(BP / 2);
      if (ps_serial_out !== lvl) ok = 1'b0;
      for (int i = 0; i < 8; i++) begin
        #(BP);
        if (d[i]) lvl = !lvl;
        if (ps_serial_out !== lvl) ok = 1'b0;
      end
      for (int i = 0; i < 2; i++) begin
        #(BP);
        if (ps_serial_out !== 1'b0) ok = 1'b0;
      end
      chk(ok, $sformatf("serial frame %h", d));
      if (ok) n_frames++;
      #(BP / 4);
    end
  end

  // ---------------------------------------------------------------- sequence
  initial begin
    logic [7:0] d;
    repeat (5) @(negedge clk);
    rst1_n = 1'b1;
    repeat (4) @(negedge clk);
    // registers and ERR* for a trigger before writing starts
    csr_rd(3'd0, d); chk(d == 8'd16, "CSR0 reset value");
    fire(1'b0);
    @(negedge clk);
    chk(!err_n, "ERR* after a trigger with writing stopped");
    csr_rd(3'd7, d); chk(d == 8'h02, "trigger-while-idle flag");
    if (!err_n && d == 8'h02) n_idle_err++;
    csr_wr(3'd7, 8'h03);
    @(negedge clk); chk(err_n, "ERR* cleared");
    csr_wr(3'd0, 8'd20);
    csr_wr(3'd4, 8'd6);
    csr_rd(3'd4, d); chk(d == 8'd6, "CSR4 write and read");
    // start writing
    @(negedge clk); wstart = 1'b1;
    @(negedge clk); wstart = 1'b0; e0 = cyc;
    chk(wrun, "WRUN");
    consume = 1'b1;
    // phase 1: single triggers, RE* readout, a calibration stretch, UBYTE words
    repeat (40) @(negedge clk);
    for (int i = 0; i < 12; i++) begin
      if (i == 4) begin cal_phase = 1'b1; cal_start = cyc + 1; end
      if (i == 8) begin cal_phase = 1'b0; cal_end = cyc + 1; end
      ubyte = (i == 10);
      fire(1'b1);
      repeat (60) @(negedge clk);
    end
    drain();
    ubyte = 1'b0;
    // phase 2: a burst of triggers every other clock while each event takes
    // 15 clocks to copy: five wait in the trigger FIFO, the seventh is refused
    csr_wr(3'd4, 8'd12);
    csr_wr(3'd0, 8'd20);
    for (int i = 0; i < 6; i++) fire(1'b1);
    fire(1'b0);
    @(negedge clk);
    csr_rd(3'd7, d);
    chk(d[0] && !err_n, "overflow flag and ERR*");
    // a refused trigger means all five trigger FIFO words were pending
    if (d[0] && !err_n) begin n_ovf++; n_five++; end
    csr_wr(3'd7, 8'h01);
    drain();
    // phase 3: readout FIFOs fill up while the host waits, then OCLK readout
    csr_wr(3'd4, 8'd10);
    csr_wr(3'd0, 8'd20);
    @(negedge clk); consume = 1'b0;
    re_n = 1'b0;
    @(negedge clk); syncmod = 1'b1;
    for (int i = 0; i < 12; i++) begin
      fire(1'b1);
      repeat (14) @(negedge clk);
    end
    chk(n_stall > 0, "readout stalled on full readout FIFOs");
    chk(!rrun && rstall, "event waiting while the FIFOs are full");
    consume = 1'b1;
    drain();
    @(negedge clk); syncmod = 1'b0;
    @(negedge clk); re_n = 1'b1;
    // RST2*: data path restarts, registers stay
    @(negedge clk); rst2_n = 1'b0;
    @(negedge clk); rst2_n = 1'b1;
    repeat (3) @(negedge clk);
    csr_rd(3'd0, d); chk(d == 8'd20, "CSR0 kept through RST2*");
    csr_rd(3'd5, d); chk(d == 8'd0, "event number cleared by RST2*");
    chk(!wrun, "writing stopped by RST2*");
    if (d == 8'd0 && !wrun) n_rst2++;
    evno_m = 0;
    // writing again after RST2*: one more event
    @(negedge clk); wstart = 1'b1;
    @(negedge clk); wstart = 1'b0; e0 = cyc;
    repeat (40) @(negedge clk);
    fire(1'b1);
    drain();
    // wait for the serial converter to finish its frames
    wait (n_frames >= 195 || $realtime > 200 * TP + 1000);
    #(3 * TP);
    // every mechanism must have happened
    chk(n_cal > 0, "calibration input");
    chk(n_two > 0, "two edges in one period");
    chk(n_rise > 0 && n_fall > 0, "rising and falling edges");
    chk(n_wrap > 0, "ring buffer wrap-around");
    chk(n_five > 0, "five pending triggers");
    chk(n_ovf > 0, "trigger FIFO overflow");
    chk(n_idle_err > 0, "trigger while writing is stopped");
    chk(n_stall > 0, "readout stall");
    chk(n_async > 0 && n_sync > 0, "RE* and OCLK readout");
    chk(n_ubyte > 0, "UBYTE");
    chk(n_rst2 > 0, "RST2*");
    chk(n_frames >= 195, "serial frames");
    $display("events=%0d cal=%0d two=%0d rise=%0d fall=%0d wrap=%0d five=%0d ovf=%0d idle_err=%0d",
             n_events, n_cal, n_two, n_rise, n_fall, n_wrap, n_five, n_ovf, n_idle_err);
    $display("stall_clocks=%0d async_words=%0d sync_words=%0d ubyte_words=%0d rst2=%0d frames=%0d",
             n_stall, n_async, n_sync, n_ubyte, n_rst2, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
