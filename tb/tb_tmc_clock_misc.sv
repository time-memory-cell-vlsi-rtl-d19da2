`timescale 1ns/1ps
// tb_tmc_clock_misc: checks that both resets assert at once and release two
// clocks later, that RST2* leaves the register reset alone, and the OSCOUT
// selection.
module tb_tmc_clock_misc;
  logic clk = 1'b0, rst1_n = 1'b0, rst2_n = 1'b1, enosc = 1'b0, tclken = 1'b0, div4 = 1'b0;
  logic osc_mon = 1'b0;
  logic rst_all_n, rst_dp_n, oscout, pll_enosc, pll_div4;
  int   checks = 0, failures = 0;

  tmc_clock_misc dut (.*);

  always #5 clk = ~clk;
  always #1.3 osc_mon = ~osc_mon;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    chk(!rst_all_n && !rst_dp_n, "both resets during RST1*");
    rst1_n = 1'b1;
    @(negedge clk);
    chk(!rst_all_n && !rst_dp_n, "held one clock");
    @(negedge clk);
    chk(rst_all_n && rst_dp_n, "released after two clocks");
    #2 rst2_n = 1'b0;
    #1 chk(rst_all_n && !rst_dp_n, "RST2* resets the data path at once, not the registers");
    @(negedge clk); rst2_n = 1'b1;
    @(negedge clk);
    chk(!rst_dp_n, "data path reset held");
    @(negedge clk);
    chk(rst_dp_n, "data path reset released");
    // OSCOUT
    for (int i = 0; i < 50; i++) begin
      #0.37;
      chk(oscout == 1'b0, "OSCOUT quiet with ENOSC low");
    end
    enosc = 1'b1; div4 = 1'b1;
    for (int i = 0; i < 50; i++) begin
      @(osc_mon);
      #0.1;
      chk(oscout == osc_mon && pll_enosc && pll_div4, "OSCOUT follows the oscillator");
    end
    tclken = 1'b1;
    for (int i = 0; i < 50; i++) begin
      @(clk);
      #0.1;
      chk(oscout == clk, "OSCOUT shows the clock in test mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
