`timescale 1ns/1ps
// tb_tmc_workload: the chip at its default sizes (two channels, 256-word ring
// buffers, 128-word readout FIFOs, 5-word trigger FIFO, 40 MHz clock) under
// two trigger conditions from the experiments it was made for.
//
//  * A level-1 latency of 3 us: the offset register is set to 120 clock
//    periods (3 us / 25 ns), so the window read out for a trigger starts
//    3 us before it. The 256-word buffer keeps 6.4 us.
//  * Bursts of five consecutive triggers, two clocks apart, 20 times. Each
//    event is 17 words per channel (CSR4 = 16), so the fifth event waits
//    about 76 clocks in the trigger FIFO. Its window then starts about 200
//    periods behind the write pointer, which still fits in the buffer.
//
// Random edges are driven on both hit inputs. The bench keeps the 32 samples
// it expects per period and channel and compares every output word, its
// channel bit and EVEND* with the words built from them (a trigger seen at
// clock edge m selects periods m-2-offset onward). It also checks that all
// five triggers of each burst are accepted and that the error flags stay
// clear.
module tb_tmc_workload;
  import tmc_pkg::*;
  import tmc_ref_pkg::*;

  localparam realtime T    = 25.0ns;
  localparam realtime STEP = T / NTAPS;

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

  tmc_phase_model #(.PERIOD(T), .NTAPS(NTAPS)) u_osc (.clk, .tap(tap0));

  tmc_teg5 dut (
    .clk, .rst1_n, .rst2_n, .enosc, .tclken, .div4, .oscout, .pll_enosc, .pll_div4,
    .tap({tap0, tap0}), .tin, .calin, .calen, .wstart, .wrun, .trig, .trigout, .rrun,
    .ra, .wr_n, .cs_n, .cio_in, .cio_out, .cio_oe, .err_n,
    .syncmod, .re_n, .oclk, .oe_n, .ubyte, .cid, .orun, .dvalid_n, .evend_n, .empflg_n,
    .d_out, .d_oe, .ch0_out, .ch0_oe, .chp, .chp_oe, .rstall
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_cal = 0, n_two = 0, n_rise = 0, n_fall = 0, n_wrap = 0, n_five = 0, n_ovf = 0;
  int n_idle_err = 0, n_stall = 0, n_async = 0, n_sync = 0, n_ubyte = 0, n_rst2 = 0;
  int n_events = 0;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $realtime); end
  endtask

  initial begin
    #(T * 60000);
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

  // ---------------------------------------------------------------- sequence
  initial begin
    logic [7:0] d;
    int         n_burst = 0;
    repeat (5) @(negedge clk);
    rst1_n = 1'b1;
    repeat (4) @(negedge clk);
    csr_wr(3'd0, 8'd120);
    csr_wr(3'd4, 8'd16);
    csr_rd(3'd0, d); chk(d == 8'd120, "offset of 3 us");
    @(negedge clk); wstart = 1'b1;
    @(negedge clk); wstart = 1'b0; e0 = cyc;
    consume = 1'b1;
    // fill the buffer past the 3 us window before the first trigger
    repeat (200) @(negedge clk);
    for (int b = 0; b < 20; b++) begin
      // fire() checks TRIGOUT for every trigger of the burst
      int f0;
      f0 = failures;
      for (int i = 0; i < 5; i++) fire(1'b1);
      if (failures == f0) n_burst++;
      drain();
      repeat ($urandom_range(20, 200)) @(negedge clk);
    end
    csr_rd(3'd7, d); chk(d == 8'h00 && err_n, "no error flag after the bursts");
    chk(n_burst == 20, "every burst of five triggers accepted");
    chk(n_events == 100, "100 events read out");
    chk(n_wrap > 0, "ring buffer wrap-around");
    chk(n_rise > 0 && n_fall > 0, "rising and falling edges");
    $display("events=%0d bursts=%0d two=%0d rise=%0d fall=%0d async_words=%0d",
             n_events, n_burst, n_two, n_rise, n_fall, n_async);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
