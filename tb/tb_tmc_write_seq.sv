`timescale 1ns/1ps
// tb_tmc_write_seq: checks that the write pointer stands still until WSTART,
// then advances by one per clock and wraps after 256 words, and that WRUN
// stays high until reset.
module tb_tmc_write_seq;
  logic       clk = 1'b0, rst_n = 1'b0, wstart = 1'b0, wrun;
  logic [7:0] wptr;
  int         checks = 0, failures = 0, wraps = 0;

  tmc_write_seq #(.DEPTH(256)) dut (.clk, .rst_n, .wstart, .wrun, .wptr);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (wptr=%0d wrun=%b)", what, wptr, wrun); end
  endtask

  initial begin
    int e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) begin @(negedge clk); chk(!wrun && wptr == 0, "idle before WSTART"); end
    wstart = 1'b1;
    @(negedge clk); wstart = 1'b0;
    chk(wrun && wptr == 0, "running, first address 0");
    e = 0;
    repeat (600) begin
      @(negedge clk);
      e++;
      chk(wrun && wptr == 8'(e % 256), "pointer advances by one per clock");
      if (wptr == 0) wraps++;
    end
    chk(wraps == 2, "pointer wrapped twice in 600 clocks");
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    @(negedge clk);
    chk(!wrun && wptr == 0, "reset stops writing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
