// clkmux_pkg: types and helper functions shared by the stoppable-clock multiplexer.
//
// act_mode_e selects how a watched clock is turned into the active-high
// asynchronous reset of its activity timer:
//   ACT_DIRECT     - the clock drives the reset as it is; use when a stopped
//                    clock rests low (a running clock then resets the timer on
//                    every high phase, a stopped one releases it).
//   ACT_INVERTED   - an inverter in front of the reset; use when a stopped
//                    clock rests high.
//   ACT_TRANSITION - a delay-and-XOR transition detector; use when the level a
//                    stopped clock rests at is unknown.
// timer_min_stages() gives the smallest flip-flop count for a timer, following
// this design's reading of the dimensioning rule (see the function's comment).
package clkmux_pkg;

  typedef enum logic [1:0] {
    ACT_DIRECT     = 2'd0,
    ACT_INVERTED   = 2'd1,
    ACT_TRANSITION = 2'd2
  } act_mode_e;

  // Smallest number of timer stages that never flags a running clock.
  // f_timing: frequency of the clock that advances the timer.
  // f_watched: frequency of the clock the timer watches (same unit).
  // A running watched clock with 50 % duty cycle holds the reset for half its
  // period and releases it for the other half. In a released half period the
  // timing clock can give at most floor(ratio/2)+1 rising edges, with
  // ratio = f_timing/f_watched, so the chain needs one stage more than that.
  // Two stages are the floor for metastability reasons. For the timer that
  // is clocked by the slower clock this always gives 2.
  function automatic int unsigned timer_min_stages(int unsigned f_timing,
                                                   int unsigned f_watched);
    int unsigned edges;
    edges = f_timing / (2 * f_watched) + 1;
    return (edges + 1 < 2) ? 2 : edges + 1;
  endfunction

endpackage
