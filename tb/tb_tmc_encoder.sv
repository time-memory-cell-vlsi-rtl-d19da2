`timescale 1ns/1ps
// tb_tmc_encoder: checks the 16-bit time encoder against a reference that
// scans the samples from the earliest one, for all single edges, all edge
// pairs and random patterns.
module tb_tmc_encoder;
  import tmc_pkg::*;

  logic [ENC_BITS-1:0] samples;
  logic                prev;
  code_t               code;
  int                  checks = 0, failures = 0;

  tmc_encoder dut (.samples, .prev, .code);

  function automatic code_t ref_code(logic [15:0] s, logic p);
    code_t r = '0;
    logic last = p;
    for (int i = 0; i < 16; i++) begin
      if (s[i] != last) begin
        r.hit = 1'b1; r.rise = s[i]; r.pos = 4'(i);
        return r;
      end
      last = s[i];
    end
    return r;
  endfunction

  task automatic try(logic [15:0] s, logic p);
    code_t e;
    samples = s; prev = p;
    #1;
    e = ref_code(s, p);
    checks++;
    if (code !== e) begin
      failures++;
      $display("FAIL samples=%h prev=%b code=%b expected=%b", s, p, code, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // a single rising edge at every position, and its falling counterpart
    for (int k = 0; k < 16; k++) begin
      try(16'hFFFF << k, 1'b0);
      try(~(16'hFFFF << k), 1'b1);
    end
    // pulses: rising at k1, falling at k2
    for (int k1 = 0; k1 < 16; k1++)
      for (int k2 = k1 + 1; k2 <= 16; k2++)
        try((16'hFFFF << k1) & ~(k2 == 16 ? 16'h0 : (16'hFFFF << k2)), 1'b0);
    // no edge
    try(16'h0000, 1'b0);
    try(16'hFFFF, 1'b1);
    for (int i = 0; i < 2000; i++) try(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
