// Clock enable decoder (block E of the inter-clock enable generator).
//
// Decodes the state of the state machine into the two raw enable pulses S3
// (for the fast clock) and S4 (for the slow clock). Each output is 1 while
// the state lies in an inclusive window set by parameters. The defaults,
// S3 in state 3 and S4 in states 3..4, are the published example for a
// positive-to-positive single-cycle test from FCK to SCK. Other inter-clock
// relations or multi-cycle paths are obtained by changing only these
// windows, as the published scheme suggests.
//
// Interface: state in; s3, s4 out. Purely combinational.
// Representing the decode as parameterized state windows is this design's
// own choice.
module clock_enable_decoder
  import ictc_pkg::*;
#(
  parameter state_t FCK_FIRST = 4'd3,
  parameter state_t FCK_LAST  = 4'd3,
  parameter state_t SCK_FIRST = 4'd3,
  parameter state_t SCK_LAST  = 4'd4
) (
  input  state_t state,
  output logic   s3,
  output logic   s4
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    s3 = (state >= FCK_FIRST) && (state <= FCK_LAST);
    s4 = (state >= SCK_FIRST) && (state <= SCK_LAST);
  end

  initial begin
    assert (FCK_FIRST != STATE_IDLE && FCK_FIRST <= FCK_LAST)
      else $error("clock_enable_decoder: bad FCK window");
    assert (SCK_FIRST != STATE_IDLE && SCK_FIRST <= SCK_LAST)
      else $error("clock_enable_decoder: bad SCK window");
  end
endmodule
