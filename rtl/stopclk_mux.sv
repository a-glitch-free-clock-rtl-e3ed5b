// stopclk_mux: glitch-free 2:1 clock multiplexer that can switch away from a
// clock that has stopped.
//
// A conventional cross-coupled switch (conv_clkmux) can only release the old
// clock while that clock still toggles. Here each input clock has an activity
// timer (activity_timer) that is clocked by the *other* clock:
//   timer 0 watches clk0: time base clk1, armed by sel_i,  reset from clk0,
//                         output disable_clk0;
//   timer 1 watches clk1: time base clk0, armed by ~sel_i, reset from clk1,
//                         output disable_clk1.
// A timer is armed only while its clock is not the selected one. While both
// clocks run, the timers are reset on every cycle of the clock they watch, the
// disables stay low and the circuit behaves exactly like the conventional
// switch. If the selected clock has stopped, say clk0, and sel_i goes to 1,
// the clk0 chain of the switch cannot move, but timer 0 is no longer held in
// reset: STAGES0 rising edges of clk1 later disable_clk0 rises, clears the
// clk0 enable, and the clk1 chain turns clk1 on. The same holds the other way
// round.
//
// Interface: only the two clocks and the select come in, only the output clock
// goes out (plus the enables and disables for observation). There is no reset.
//
// Parameters: STAGES0/STAGES1 are the flip-flop counts of the timers watching
// clk0/clk1 (at least 2; see clkmux_pkg::timer_min_stages for sizing to a
// frequency ratio), USE_COUNTER swaps the chains for counters, ACT_MODE0/1
// pick how each watched clock drives its timer reset (direct, inverted or
// through a transition detector), TD_DELAY is the detector's delay.
//
// Timing for a switch away from a stopped clock: disable after STAGES of the
// new clock's rising edges, then one more rising and one falling edge of the
// new clock until its enable is set.
//
// The timers, their hook-up and the two-stage default follow the published
// architecture; the selectable reset conditioning is this design's way of
// covering the three cases the architecture names.
module stopclk_mux
  import clkmux_pkg::*;
#(
  parameter int unsigned STAGES0     = 2,
  parameter int unsigned STAGES1     = 2,
  parameter bit          USE_COUNTER = 1'b0,
  parameter act_mode_e   ACT_MODE0   = ACT_DIRECT,
  parameter act_mode_e   ACT_MODE1   = ACT_DIRECT,
  parameter int unsigned TD_DELAY    = 1
) (
  input  logic clk0_i,
  input  logic clk1_i,
  input  logic sel_i,          // 0: clk0, 1: clk1
  output logic clk_o,
  output logic en_clk0_o,
  output logic en_clk1_o,
  output logic disable_clk0_o,
  output logic disable_clk1_o
);

  logic act0, act1;   // timer resets derived from the watched clocks

  if (ACT_MODE0 == ACT_TRANSITION) begin : g_act0_td
    transition_detect #(.DELAY(TD_DELAY)) u_td0 (.sig_i(clk0_i), .pulse_o(act0));
  end else if (ACT_MODE0 == ACT_INVERTED) begin : g_act0_inv
    assign act0 = ~clk0_i;
  end else begin : g_act0_dir
    assign act0 = clk0_i;
  end

  if (ACT_MODE1 == ACT_TRANSITION) begin : g_act1_td
    transition_detect #(.DELAY(TD_DELAY)) u_td1 (.sig_i(clk1_i), .pulse_o(act1));
  end else if (ACT_MODE1 == ACT_INVERTED) begin : g_act1_inv
    assign act1 = ~clk1_i;
  end else begin : g_act1_dir
    assign act1 = clk1_i;
  end

  activity_timer #(.STAGES(STAGES0), .USE_COUNTER(USE_COUNTER)) u_timer_clk0 (
    .clk_i  (clk1_i),
    .rst_i  (act0),
    .din_i  (sel_i),
    .dout_o (disable_clk0_o)
  );

  activity_timer #(.STAGES(STAGES1), .USE_COUNTER(USE_COUNTER)) u_timer_clk1 (
    .clk_i  (clk0_i),
    .rst_i  (act1),
    .din_i  (~sel_i),
    .dout_o (disable_clk1_o)
  );

  conv_clkmux u_switch (
    .clk0_i         (clk0_i),
    .clk1_i         (clk1_i),
    .sel_i          (sel_i),
    .disable_clk0_i (disable_clk0_o),
    .disable_clk1_i (disable_clk1_o),
    .en_clk0_o      (en_clk0_o),
    .en_clk1_o      (en_clk1_o),
    .clk_o          (clk_o)
  );

endmodule
