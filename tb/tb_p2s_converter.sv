`timescale 1ns/1ps
// tb_p2s_converter: sends random bytes through the converter at 20 MHz,
// samples the serial line in the middle of each of the 11 bit times and checks
// the start bit, the NRZI coding of D0-D7 and the two stop bits; also checks
// that one 11-bit frame takes exactly one clock period (220 Mb/s).
module tb_p2s_converter;
  localparam realtime T = 50.0ns;
  localparam realtime B = T / 11;

  logic       clk, tap_start, stop, serial_out;
  logic [7:0] tap_d, data;
  int         checks = 0, failures = 0;
  realtime    t_prev_rise = 0, t_rise;
  int         rises = 0;

  p2s_timing_model #(.PERIOD(T)) u_dl (.clk, .tap_start, .tap_d, .stop);
  p2s_converter dut (.tap_start, .tap_d, .stop, .data, .serial_out);

  initial begin
    #(T * 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame period from the start-bit edges: a rise of the line within half a
  // bit of the start strobe
  realtime t_clk = 0;
  always @(posedge clk) t_clk = $realtime;
  always @(posedge serial_out) begin
    t_rise = $realtime;
    if (t_rise - t_clk < B / 2) begin
      if (rises > 0) begin
        checks++;
        if ((t_rise - t_prev_rise) < T - 0.01 || (t_rise - t_prev_rise) > T + 0.01) begin
          failures++;
          $display("FAIL frame period %0t", t_rise - t_prev_rise);
        end
      end
      rises++;
      t_prev_rise = t_rise;
    end
  end

  initial begin
    logic [7:0] d;
    logic       lvl;
    data = 8'h00;
    @(posedge clk);
    repeat (300) begin
      // data is set during the stop bits of the previous frame
      d = 8'($urandom);
      if ($urandom_range(0, 9) == 0) d = 8'hFF;
      if ($urandom_range(0, 9) == 0) d = 8'h00;
      data = d;
      @(posedge clk);
      lvl = 1'b1;                       // start bit
      #(B / 2);
      checks++;
      if (serial_out !== lvl) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin
        #(B);
        if (d[i]) lvl = !lvl;           // a one changes the line
        checks++;
        if (serial_out !== lvl) begin
          failures++;
          $display("FAIL data %h bit %0d line=%b expected=%b", d, i, serial_out, lvl);
        end
      end
      for (int i = 0; i < 2; i++) begin
        #(B);
        checks++;
        if (serial_out !== 1'b0) begin failures++; $display("FAIL stop bit %0d", i); end
      end
      #(B / 4);
    end
    checks++;
    if (rises < 290) begin failures++; $display("FAIL only %0d frames seen", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
