// Delay generator (block A of the inter-clock enable generator).
//
// An N-stage shift register clocked by the fast clock FCK. It delays the
// scan-enable SE so that the internal signal S1 falls N FCK edges after SE
// falls, i.e. at least (N-1) FCK periods later. This stretches the time
// between the end of shift and the first capture pulse (d1), so SE can be
// routed as an ordinary, non-timing-critical data signal.
//
// Interface: fck, rst_n (asynchronous, active low), se in; s1 out.
// Timing: s1 equals se as it was N rising FCK edges earlier.
// The shift-register structure and N = 8 (the value used on the published
// industrial chip; its example waveform uses 3) follow the published scheme. The
// reset, which loads all stages with 1 (shift mode, no capture), is this
// design's own choice.
module delay_generator #(
  parameter int unsigned N = 8
) (
  input  logic fck,
  input  logic rst_n,
  input  logic se,
  output logic s1
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N-1:0] stage;

  always_ff @(posedge fck or negedge rst_n) begin
    if (!rst_n) stage <= '1;
    else        stage <= {stage[N-2:0], se};
  end

  assign s1 = stage[N-1];

  initial assert (N >= 2) else $error("delay_generator: N must be at least 2");
endmodule
