`timescale 1ns/1ps
// tb_tmc_channel: drives one channel with random edges on the hit input and,
// in stretches with CALEN high, on the calibration input while the hit input
// keeps toggling. Each clock period's word is written into the ring buffer at
// the bench's address count; afterwards the last 256 words are read back and
// compared with the reference encoding of the selected input, and a few words
// are passed through the readout FIFO.
module tb_tmc_channel;
  import tmc_pkg::*;
  import tmc_ref_pkg::*;

  localparam realtime T    = 25.0ns;
  localparam realtime STEP = T / NTAPS;

  logic              clk, rst_n = 1'b0, tin = 1'b0, calin = 1'b0, calen = 1'b0;
  logic [NTAPS-1:0]  tap;
  logic              we = 1'b0, re = 1'b0, rf_push = 1'b0, rf_pop = 1'b0;
  logic [7:0]        wadr = '0, radr = '0;
  logic [WORD_W-1:0] rdata, rf_wdata = '0, rf_rdata;
  logic              rf_empty;
  logic [7:0]        rf_count;
  int                checks = 0, failures = 0, cal_hits = 0, two_hits = 0;

  tmc_phase_model #(.PERIOD(T), .NTAPS(NTAPS)) u_osc (.clk, .tap);
  tmc_channel dut (.*);

  logic [31:0] bits [0:1023];   // samples of the selected input per period
  int          cyc = 0;

  initial begin
    #(T * 3000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // stimulus, one clock period at a time
  initial begin
    int ka[2], kc[2];
    logic lt = 1'b0, lc = 1'b0;
    @(posedge clk); cyc++;
    #1 rst_n = 1'b1;
    forever begin
      calen = ((cyc / 50) % 3 == 2);
      for (int j = 0; j < 2; j++) begin
        ka[j] = ($urandom_range(0, 2) == 0) ? 99 : $urandom_range(0, 31);
        kc[j] = ($urandom_range(0, 2) == 0) ? 99 : $urandom_range(0, 31);
      end
      for (int k = 0; k < NTAPS; k++) begin
        for (int j = 0; j < 2; j++) begin
          if (k == ka[j]) lt = !lt;
          if (k == kc[j]) lc = !lc;
        end
        tin = lt; calin = lc;
        bits[cyc % 1024][k] = calen ? lc : lt;
        if (k != NTAPS - 1) #(STEP);
      end
      @(posedge clk); cyc++;
    end
  end

  // write address: at edge n the word of period n-2 goes to address n % 256
  initial begin
    logic [WORD_W-1:0] w;
    int last;
    repeat (3) @(posedge clk);
    @(negedge clk);
    we = 1'b1; wadr = 8'(cyc + 1);
    repeat (400) begin
      @(negedge clk);
      wadr = 8'(cyc + 1);
    end
    we = 1'b0;
    last = cyc;        // last edge that wrote: cyc, period cyc-2
    for (int n = last - 255; n <= last; n++) begin
      @(negedge clk);
      re = 1'b1; radr = 8'(n);
      @(negedge clk);
      re = 1'b0;
      w = ref_word(bits[(n - 2) % 1024], bits[(n - 3) % 1024][31]);
      chk(rdata === w, $sformatf("period %0d word %h expected %h", n - 2, rdata, w));
      if (w[11] && w[5]) two_hits++;
      if (((n - 2) / 50) % 3 == 2 && (w[11] || w[5])) cal_hits++;
    end
    chk(two_hits > 0 && cal_hits > 0, "both encoders hit and calibration input seen");
    // readout FIFO path
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); rf_push = 1'b1; rf_wdata = 12'(100 + i);
    end
    @(negedge clk); rf_push = 1'b0;
    chk(rf_count == 8'd3 && !rf_empty, $sformatf("readout FIFO holds three words (%0d)", rf_count));
    for (int i = 0; i < 3; i++) begin
      chk(rf_rdata == 12'(100 + i), $sformatf("readout FIFO order %0d", rf_rdata));
      rf_pop = 1'b1; @(negedge clk); rf_pop = 1'b0;
    end
    chk(rf_empty, "readout FIFO empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
