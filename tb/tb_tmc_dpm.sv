`timescale 1ns/1ps
// tb_tmc_dpm: fills the 256-word ring buffer while reading behind the write
// address, then reads it all back, comparing with a copy kept in the bench;
// also checks that a read of the address being written returns the old word.
module tb_tmc_dpm;
  localparam int DEPTH = 256, WIDTH = 12;

  logic             clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [7:0]       wadr = '0, radr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] expd;
  int               checks = 0, failures = 0;

  tmc_dpm #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .wadr, .wdata, .re, .radr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [WIDTH-1:0] e, string what);
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("FAIL %s: rdata=%h expected=%h", what, rdata, e);
    end
  endtask

  initial begin
    // two passes round the ring, each word different
    for (int p = 0; p < 2; p++) begin
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = 1'b1; wadr = 8'(a); wdata = 12'($urandom);
        model[a] = wdata;
      end
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      re = 1'b1; radr = 8'(a); expd = model[a];
      @(negedge clk);
      re = 1'b0;
      chk(expd, "readback");
      // rdata holds while re is low
      @(negedge clk);
      chk(expd, "hold");
    end
    // read and write the same address in one clock: old word comes out
    @(negedge clk);
    we = 1'b1; re = 1'b1; wadr = 8'd77; radr = 8'd77; wdata = ~model[77];
    expd = model[77];
    @(negedge clk);
    we = 1'b0; re = 1'b0;
    chk(expd, "read during write");
    @(negedge clk); re = 1'b1;
    @(negedge clk); re = 1'b0;
    chk(~expd, "new word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
