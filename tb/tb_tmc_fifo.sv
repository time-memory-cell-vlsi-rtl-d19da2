`timescale 1ns/1ps
// tb_tmc_fifo: runs the 128 x 12 readout FIFO and the 5 x 8 trigger FIFO
// configurations against a queue model with random push and pop, including
// filling both to full and draining them to empty.
module tb_tmc_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // readout FIFO configuration
  logic        r_push = 0, r_pop = 0, r_empty, r_full;
  logic [11:0] r_wdata = '0, r_rdata;
  logic [7:0]  r_count;
  tmc_fifo #(.DEPTH(128), .WIDTH(12)) u_r (
    .clk, .rst_n, .push(r_push), .wdata(r_wdata), .pop(r_pop), .rdata(r_rdata),
    .empty(r_empty), .full(r_full), .count(r_count));

  // trigger FIFO configuration
  logic        t_push = 0, t_pop = 0, t_empty, t_full;
  logic [7:0]  t_wdata = '0, t_rdata;
  logic [2:0]  t_count;
  tmc_fifo #(.DEPTH(5), .WIDTH(8)) u_t (
    .clk, .rst_n, .push(t_push), .wdata(t_wdata), .pop(t_pop), .rdata(t_rdata),
    .empty(t_empty), .full(t_full), .count(t_count));

  logic [11:0] rq[$];
  logic [7:0]  tq[$];
  int          r_fulls = 0, t_fulls = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int bias);
    // bias: percent chance of push
    @(negedge clk);
    // compare state before the edge
    checks++;
    if (r_count != 8'(rq.size()) || r_empty != (rq.size() == 0) || r_full != (rq.size() == 128) ||
        (rq.size() != 0 && r_rdata !== rq[0])) begin
      failures++;
      $display("FAIL readout fifo count=%0d model=%0d", r_count, rq.size());
    end
    checks++;
    if (t_count != 3'(tq.size()) || t_empty != (tq.size() == 0) || t_full != (tq.size() == 5) ||
        (tq.size() != 0 && t_rdata !== tq[0])) begin
      failures++;
      $display("FAIL trigger fifo count=%0d model=%0d", t_count, tq.size());
    end
    if (r_full) r_fulls++;
    if (t_full) t_fulls++;
    r_push = ($urandom_range(0, 99) < bias); r_pop = ($urandom_range(0, 99) >= bias);
    t_push = ($urandom_range(0, 99) < bias); t_pop = ($urandom_range(0, 99) >= bias);
    r_wdata = 12'($urandom); t_wdata = 8'($urandom);
    // update the model with what the coming edge does
    if (r_pop && rq.size() != 0) void'(rq.pop_front());
    if (r_push && r_count != 128) rq.push_back(r_wdata);
    if (t_pop && tq.size() != 0) void'(tq.pop_front());
    if (t_push && t_count != 5) tq.push_back(t_wdata);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (300) step(90);   // fill up
    repeat (300) step(10);   // drain
    repeat (2000) step(50);  // mixed
    repeat (300) step(0);
    checks++;
    if (r_fulls == 0 || t_fulls == 0) begin
      failures++;
      $display("FAIL full state never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
