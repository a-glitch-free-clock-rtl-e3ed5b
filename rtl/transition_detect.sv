// transition_detect: behavioural model of a clock-activity (transition) detector.
//
// This is a behavioural model, not synthesizable logic: it stands for a
// delay cell and an XOR gate built from library cells. The XOR compares the
// signal with a copy of itself delayed by DELAY time units, so the output
// pulses high for DELAY after every rising and every falling edge of sig_i
// and rests low whatever level sig_i stops at. A running clock therefore gives
// a stream of reset pulses, a stopped clock none. DELAY must be shorter than
// the shortest half period of the watched clock and long enough to reset the
// timer flops. Delay-cell plus XOR is the published structure; the non-inverting
// delay and the default of 1 time unit are this model's choice.
module transition_detect #(
  parameter int unsigned DELAY = 1
) (
  input  logic sig_i,
  output logic pulse_o
);

  logic sig_dly;

  assign #(DELAY) sig_dly = sig_i;
  assign pulse_o = sig_i ^ sig_dly;

endmodule
