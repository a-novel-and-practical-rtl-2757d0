// Generator selector for three inter-clock enable generators.
//
// Decodes the two select inputs D1, D2 into the generator enables GE1..GE3,
// of which at most one is 1, so that the generators are activated one at a
// time: D1=1,D2=0 -> GE1; D1=0,D2=1 -> GE2; D1=1,D2=1 -> GE3; D1=D2=0 -> none.
//
// Interface: d1, d2 in; ge[3:1] out. Purely combinational.
// The three AND gates with inverted inputs follow the published scheme; which
// code selects which generator is this design's reading of it.
module generator_selector (
  input  logic       d1,
  input  logic       d2,
  output logic [3:1] ge
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    ge[1] =  d1 & ~d2;
    ge[2] = ~d1 &  d2;
    ge[3] =  d1 &  d2;
  end

  always_comb assert ($onehot0(ge)) else $error("generator_selector: more than one GE");
endmodule
