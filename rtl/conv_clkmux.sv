// conv_clkmux: conventional glitch-free switch between two unrelated clocks,
// extended with asynchronous per-clock disable inputs.
//
// Each clock owns a two-flop chain. The request for clk1 is sel_i AND NOT
// en_clk0; the request for clk0 is NOT sel_i AND NOT en_clk1. Each request is
// captured on the rising edge of its own clock and passed on by a second
// flop on the falling edge, whose output is the enable en_clk<n>. The output
// clock is (clk0 AND en_clk0) OR (clk1 AND en_clk1). Because each chain waits
// for the other enable to be low, the old clock is always switched off before
// the new one is switched on; because enables change only while their clock
// is low, no shortened pulse reaches clk_o.
//
// disable_clk<n>_i is an active-high asynchronous reset of both flops of the
// chain of clk<n>. It lets the switch drop a clock that no longer toggles, and
// so no longer moves its own chain; the timers of stopclk_mux drive it. With
// both disables tied low this is the plain cross-coupled switch.
//
// Timing: after sel_i changes, the old enable falls on the falling edge that
// follows the next rising edge of the old clock; the new enable then rises on
// the falling edge that follows the next rising edge of the new clock. There is no reset port: the switch only has its
// select and clock inputs, and it settles by itself within two cycles of each
// clock (a state with both enables set clears both requests).
//
// The cross-coupling, the two-flop chains and the disable hook-up follow the
// published architecture. The falling-edge second stage and the AND/OR output
// gating are this design's choice of the usual way to keep the gated clock
// free of short pulses.
module conv_clkmux (
  input  logic clk0_i,
  input  logic clk1_i,
  input  logic sel_i,            // 0: clk0, 1: clk1
  input  logic disable_clk0_i,   // async clear of the clk0 chain
  input  logic disable_clk1_i,   // async clear of the clk1 chain
  output logic en_clk0_o,
  output logic en_clk1_o,
  output logic clk_o
);

  logic sel_clk0, sel_clk1;
  logic req0_q, req1_q;   // first flop of each chain (rising edge)
  logic en0_q, en1_q;     // second flop of each chain (falling edge)

  assign sel_clk1 =  sel_i & ~en0_q;
  assign sel_clk0 = ~sel_i & ~en1_q;

  // clk1 chain
  always_ff @(posedge clk1_i or posedge disable_clk1_i) begin
    if (disable_clk1_i) req1_q <= 1'b0;
    else                req1_q <= sel_clk1;
  end

  always_ff @(negedge clk1_i or posedge disable_clk1_i) begin
    if (disable_clk1_i) en1_q <= 1'b0;
    else                en1_q <= req1_q;
  end

  // clk0 chain
  always_ff @(posedge clk0_i or posedge disable_clk0_i) begin
    if (disable_clk0_i) req0_q <= 1'b0;
    else                req0_q <= sel_clk0;
  end

  always_ff @(negedge clk0_i or posedge disable_clk0_i) begin
    if (disable_clk0_i) en0_q <= 1'b0;
    else                en0_q <= req0_q;
  end

  assign en_clk0_o = en0_q;
  assign en_clk1_o = en1_q;
  assign clk_o     = (clk0_i & en0_q) | (clk1_i & en1_q);

endmodule
