`timescale 1ns/1ps
// tb_tmc_trig_seq: checks the event position (write pointer minus offset,
// modulo 256), triggering on the rising edge only, TRIGOUT, and the refusal
// of triggers with the trigger FIFO full or writing stopped.
module tb_tmc_trig_seq;
  logic       clk = 1'b0, rst_n = 1'b0, trig = 1'b0, wrun = 1'b0, tfifo_full = 1'b0;
  logic [7:0] wptr = '0, offset = '0, tfifo_pos;
  logic       tfifo_push, trigout, err_ovf, err_idle;
  int         checks = 0, failures = 0;

  tmc_trig_seq #(.DEPTH(256)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // one trigger: TRIG rises before a clock edge and is held for `len` clocks
  task automatic fire(int len, logic exp_push, logic exp_ovf, logic exp_idle);
    @(negedge clk);
    trig = 1'b1;
    #1;
    chk(tfifo_push == exp_push && err_ovf == exp_ovf && err_idle == exp_idle, "trigger edge outcome");
    chk(!exp_push || tfifo_pos == 8'((256 + int'(wptr) - int'(offset)) % 256), "event position");
    @(negedge clk);
    chk(trigout == exp_push, "TRIGOUT pulse");
    for (int i = 1; i < len; i++) begin
      chk(!tfifo_push && !err_ovf && !err_idle, "no second trigger while TRIG stays high");
      @(negedge clk);
    end
    trig = 1'b0;
    @(negedge clk);
    chk(!trigout, "TRIGOUT is one clock");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fire(1, 1'b0, 1'b0, 1'b1);           // writing not started
    wrun = 1'b1;
    for (int i = 0; i < 200; i++) begin
      wptr = 8'($urandom); offset = 8'($urandom);
      fire($urandom_range(1, 3), 1'b1, 1'b0, 1'b0);
    end
    tfifo_full = 1'b1;
    fire(1, 1'b0, 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
