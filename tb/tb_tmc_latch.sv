`timescale 1ns/1ps
// tb_tmc_latch: drives the time memory cell with pulses whose edges fall at
// known fractions of the clock period and checks the 32-bit sample word and
// the carried last sample, one clock after each period.
module tb_tmc_latch;
  import tmc_pkg::*;

  localparam realtime T    = 25.0ns;
  localparam realtime STEP = T / NTAPS;

  logic             clk, rst_n, tin;
  logic [NTAPS-1:0] tap, samples;
  logic             prev_last;
  int               checks = 0, failures = 0;
  logic [NTAPS-1:0] expv [0:1023];
  int               cyc = 0;

  tmc_phase_model #(.PERIOD(T), .NTAPS(NTAPS)) u_osc (.clk, .tap);
  tmc_latch dut (.clk, .rst_n, .tap, .tin, .samples, .prev_last);

  initial begin
    #(T * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: in each period up to two edges at random tap positions
  initial begin
    int k1, k2;
    logic lvl;
    tin = 1'b0; rst_n = 1'b0; lvl = 1'b0;
    @(posedge clk); cyc++;
    #1 rst_n = 1'b1;
    forever begin
      k1 = $urandom_range(0, 31);
      k2 = $urandom_range(0, 31);
      if ($urandom_range(0, 3) == 0) k1 = 99;       // no first edge
      if ($urandom_range(0, 1) == 0) k2 = 99;       // no second edge
      for (int k = 0; k < NTAPS; k++) begin
        if (k == k1) lvl = !lvl;
        if (k == k2 && k2 != k1) lvl = !lvl;
        tin = lvl;
        expv[cyc % 1024][k] = lvl;
        if (k != NTAPS - 1) #(STEP);
      end
      @(posedge clk); cyc++;
    end
  end

  // check: after edge n+1 the samples of period n are visible
  initial begin
    int n;
    // skip the first periods, while the oscillator model starts up
    @(posedge clk);
    repeat (4) @(posedge clk);
    repeat (600) begin
      @(negedge clk);
      n = cyc - 1;
      checks++;
      if (samples !== expv[n % 1024]) begin
        failures++;
        $display("FAIL period %0d samples=%h expected=%h", n, samples, expv[n % 1024]);
      end
      checks++;
      if (prev_last !== expv[(n - 1) % 1024][NTAPS-1]) begin
        failures++;
        $display("FAIL period %0d prev_last=%b", n, prev_last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
