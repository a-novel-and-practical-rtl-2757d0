// Start enable generator (block B of the inter-clock enable generator).
//
// A 4-stage shift register FFa..FFd clocked by FCK samples the (slightly
// delayed) slow clock SCK. FFa and FFb form a two-flop synchronizer against
// metastability; FFc and FFd hold the two most recent synchronized samples.
// S2 = FFc AND NOT FFd is 1 for exactly one FCK period after each rising
// SCK edge has passed the synchronizer. With a 2:1 clock ratio that period
// is one in which SCK is low, so S2 marks SCK falling edges and gives the
// start signal generator a fixed timing base.
//
// Interface: fck, rst_n (asynchronous, active low), sck_d (delayed SCK) in;
// s2 out. Timing: a rising SCK edge sampled at FCK edge k makes s2 high in
// the FCK period that starts at edge k+2.
// The four flops, their roles and the AND with the inverted FFd input follow
// the published schematic; the reset is this design's own choice.
module start_enable_generator (
  input  logic fck,
  input  logic rst_n,
  input  logic sck_d,
  output logic s2
);
  timeunit 1ns;
  timeprecision 1ps;

  logic ff_a, ff_b, ff_c, ff_d;

  always_ff @(posedge fck or negedge rst_n) begin
    if (!rst_n) begin
      ff_a <= 1'b0;
      ff_b <= 1'b0;
      ff_c <= 1'b0;
      ff_d <= 1'b0;
    end else begin
      ff_a <= sck_d;
      ff_b <= ff_a;
      ff_c <= ff_b;
      ff_d <= ff_c;
    end
  end

  assign s2 = ff_c & ~ff_d;
endmodule
