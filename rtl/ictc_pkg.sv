// Shared types and constants of the inter-clock at-speed test controller.
//
// The enable generator measures the phase of a fast clock FCK against a
// synchronous slow clock SCK (integer ratio RATIO, SCK at 50 % duty, rising
// together with FCK) with a 4-bit state counter. States 1..15 name the
// fifteen FCK periods after the start of a capture window; state 0 is idle.
//
// Timing reference used by the decode functions below. Call E0 the rising
// FCK edge that coincides with an SCK rising edge and whose sampled rise
// produces the start pulse; Ek is the k-th FCK edge after it. State k then
// occupies the FCK period [E(4+k), E(5+k)). A decoder output that is 1 in
// state k makes the master enable 1 in state k+1, and the final-enable latch
// lets through the clock pulse at edge E(6+k). A pulse at edge Ee therefore
// needs decode state e-6. SCK pulses are possible only at edges that are
// multiples of RATIO.
//
// The target edge is the first multiple of RATIO at or after E10. For a
// fast-to-slow test the FCK launch pulse is one FCK period before the SCK
// capture pulse at the target edge; for slow-to-fast the SCK launch pulse is
// at the target edge and the FCK capture pulse one FCK period later. Both
// are positive-to-positive single-cycle relations. For RATIO = 2 and
// fast-to-slow this gives the published decode (FCK: state 3, SCK: states
// 3 and 4); the general formula, the reverse direction and the extension
// of the SCK window to the state before are this design's own derivation.
package ictc_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned STATE_W = 4;
  typedef logic [STATE_W-1:0] state_t;

  localparam state_t STATE_IDLE = '0;

  // Direction of the inter-clock logic block under test.
  typedef enum logic {
    FAST_TO_SLOW = 1'b0,
    SLOW_TO_FAST = 1'b1
  } direction_t;

  // First SCK rising edge (counted in FCK edges after E0) at or after E10.
  function automatic int unsigned target_edge(int unsigned ratio);
    return ((10 + ratio - 1) / ratio) * ratio;
  endfunction

  // Decode window for the FCK enable (a single state).
  function automatic state_t fck_state(int unsigned ratio, direction_t dir);
    return (dir == FAST_TO_SLOW) ? state_t'(target_edge(ratio) - 7)
                                 : state_t'(target_edge(ratio) - 5);
  endfunction

  // Decode window for the SCK enable: two states, ending at the one whose
  // master enable is high at the end of the SCK-low phase before the pulse.
  function automatic state_t sck_first_state(int unsigned ratio);
    return state_t'(target_edge(ratio) - 7);
  endfunction

  function automatic state_t sck_last_state(int unsigned ratio);
    return state_t'(target_edge(ratio) - 6);
  endfunction

  // A pair of master clock enables, one per clock of a synchronous pair.
  typedef struct packed {
    logic fck;
    logic sck;
  } en_pair_t;
endpackage
