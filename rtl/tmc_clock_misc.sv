// tmc_clock_misc: reset generation and oscillator monitor.
//
// RST1* resets the whole chip including the registers; RST2* resets only the
// data path (pointers, FIFOs, sequencers, event number) and keeps the register
// settings. Both are asserted asynchronously and released synchronously to
// clk through two flops. OSCOUT shows the ring oscillator (one of its taps)
// when ENOSC is high, or the system clock when TCLKEN is high, for test.
// ENOSC and DIV4 (the PLL's x4 multiplication mode for input clocks of
// 12.5 to 2.5 MHz) are passed on to the PLL.
// The synchroniser flops are both cleared asynchronously and used as the
// asynchronous reset of the rest of the chip; that is the usual reset
// synchroniser and the reason lint reports them as both sync and async nets.
//
// The pin names come from the chip's block diagram; what each pin does here
// (the split of the two resets, the OSCOUT selection) is this design's choice.
module tmc_clock_misc (
  input  logic clk,
  input  logic rst1_n,
  input  logic rst2_n,
  input  logic enosc,
  input  logic tclken,
  input  logic div4,
  input  logic osc_mon,     // one tap of the ring oscillator
  output logic rst_all_n,   // registers and data path
  output logic rst_dp_n,    // data path only
  output logic oscout,
  output logic pll_enosc,
  output logic pll_div4
);

  logic [1:0] s1, s2;
  logic       rst_dp_async_n;

  assign rst_dp_async_n = rst1_n && rst2_n;

  always_ff @(posedge clk or negedge rst1_n) begin
    if (!rst1_n) s1 <= '0;
    else         s1 <= {s1[0], 1'b1};
  end

  always_ff @(posedge clk or negedge rst_dp_async_n) begin
    if (!rst_dp_async_n) s2 <= '0;
    else                  s2 <= {s2[0], 1'b1};
  end

  assign rst_all_n = s1[1];
  assign rst_dp_n  = s2[1];
  assign oscout    = tclken ? clk : (enosc && osc_mon);
  assign pll_enosc = enosc;
  assign pll_div4  = div4;

endmodule
