`timescale 1ns/1ps
// tb_tmc_csr: writes and reads back the read/write registers, reads the
// status registers, checks reset values, the sticky error flags with
// write-one-to-clear, the error mask and ERR*.
module tb_tmc_csr;
  import tmc_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cs_n = 1'b1, wr_n = 1'b1;
  logic [2:0]  ra = '0;
  logic [7:0]  cio_in = '0, cio_out;
  logic        cio_oe;
  logic [7:0]  offset, wcount;
  logic [7:0]  rptr = 8'h5A, wptr = 8'hC3;
  logic [11:0] evno = 12'hABC;
  logic        wrun = 1'b1, rrun = 1'b0, orun = 1'b1;
  logic [2:0]  tcount = 3'd5;
  logic [1:0]  err_set = '0;
  logic        err_n;
  int          checks = 0, failures = 0;

  tmc_csr dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [7:0] got, logic [7:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, e);
    end
  endtask

  task automatic wr(logic [2:0] a, logic [7:0] d);
    @(negedge clk); cs_n = 1'b0; wr_n = 1'b0; ra = a; cio_in = d;
    @(negedge clk); cs_n = 1'b1; wr_n = 1'b1;
  endtask

  task automatic rd(logic [2:0] a, output logic [7:0] d);
    @(negedge clk); cs_n = 1'b0; wr_n = 1'b1; ra = a;
    #1;
    checks++;
    if (!cio_oe) begin failures++; $display("FAIL cio_oe low during read"); end
    d = cio_out;
    @(negedge clk); cs_n = 1'b1;
  endtask

  initial begin
    logic [7:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // reset values
    rd(3'd0, d); chk(d, 8'd16, "offset reset");
    rd(3'd4, d); chk(d, 8'd8, "wcount reset");
    rd(3'd6, d); chk(d, 8'hFF, "errmask reset");
    chk(offset, 8'd16, "offset port");
    // read/write registers
    wr(3'd0, 8'd37); rd(3'd0, d); chk(d, 8'd37, "offset"); chk(offset, 8'd37, "offset port");
    wr(3'd4, 8'd99); rd(3'd4, d); chk(d, 8'd99, "wcount"); chk(wcount, 8'd99, "wcount port");
    // status registers ignore writes
    wr(3'd1, 8'h00); rd(3'd1, d); chk(d, 8'h5A, "rptr");
    rd(3'd3, d); chk(d, 8'hC3, "wptr");
    rd(3'd5, d); chk(d, 8'hBC, "evno");
    rd(3'd2, d); chk(d, {2'b00, 1'b1, 1'b0, 1'b1, 3'd5}, "status");
    #1;
    checks++;
    if (cio_oe) begin failures++; $display("FAIL cio_oe high while deselected"); end
    // errors
    chk(8'(err_n), 8'd1, "err_n idle");
    @(negedge clk); err_set = 2'b01;
    @(negedge clk); err_set = 2'b00;
    chk(8'(err_n), 8'd0, "err_n after overflow");
    rd(3'd7, d); chk(d, 8'h01, "errflag overflow");
    @(negedge clk); err_set = 2'b10;
    @(negedge clk); err_set = 2'b00;
    rd(3'd7, d); chk(d, 8'h03, "errflag both");
    wr(3'd7, 8'h01); rd(3'd7, d); chk(d, 8'h02, "clear bit 0");
    chk(8'(err_n), 8'd0, "err_n with bit 1");
    wr(3'd6, 8'h01); chk(8'(err_n), 8'd1, "err_n masked");
    wr(3'd7, 8'h02); rd(3'd7, d); chk(d, 8'h00, "clear bit 1");
    // reset restores defaults
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    rd(3'd0, d); chk(d, 8'd16, "offset after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
