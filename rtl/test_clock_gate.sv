// Test clock gate: final-enable latch, clock-gating AND and shift-clock
// multiplexer for one functional clock.
//
// In capture mode (se = 0) the master enable is passed through a latch that
// is transparent while the functional clock is low (LA1 / LA2). The latched
// final enable can therefore only change while the clock is low, and ANDing
// it with the clock gives whole, glitch-free clock pulses. In shift mode
// (se = 1) the multiplexer selects the shift clock instead.
//
// Interface: clk (free-running functional clock), rst_n (asynchronous,
// active low, clears the latch), en_master, shift_ck, se in; en (final
// enable) and tclk (test clock) out.
// Timing: en follows en_master half a clock period after the rising clock
// edge; a master enable that is high at the end of a clock-low phase lets
// the following high phase of clk through to tclk.
// The latch, AND gate and multiplexer follow the published architecture; the
// latch reset is this design's own choice. The latch is intended: it is the
// standard glitch-free clock-gating cell.
module test_clock_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic en_master,
  input  logic shift_ck,
  input  logic se,
  output logic en,
  output logic tclk
);
  timeunit 1ns;
  timeprecision 1ps;

  // Transparent while clk is low; reset forces the final enable low.
  always_latch begin
    if (!clk || !rst_n) en = en_master & rst_n;
  end

  assign tclk = se ? shift_ck : (clk & en);
endmodule
