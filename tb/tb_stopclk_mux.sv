// tb_stopclk_mux: self-checking test of the stoppable-clock multiplexer in its
// three activity-detection forms.
//
//   DUT 0: timer resets driven straight by the clocks (clocks stop low),
//          shift-chain timers.
//   DUT 1: timer resets through inverters (clocks stop high), chain timers.
//   DUT 2: timer resets through transition detectors (any stop level),
//          counter timers with longer timeouts.
// clk0 (half period 50) is 3.4 times faster than clk1 (half period 170); the
// stage counts come from clkmux_pkg::timer_min_stages for that ratio. Phase A
// stops the clocks low and checks DUTs 0 and 2, phase B stops them high and
// checks DUTs 1 and 2. In each phase the test switches with both clocks
// running, away from a stopped clk0, back to a still stopped clk0, and away
// from a stopped clk1. Checked throughout: no clk_o pulse shorter than the
// shortest half period, never both enables high, clk_o following the selected
// clock; and at each stopped-clock switch the exact rising edge on which the
// disable rises (STAGES edges of the running clock after sel changes) and the
// falling edge on which the new clock is enabled (the one after edge
// STAGES+1).
module tb_stopclk_mux;
  import clkmux_pkg::*;

  localparam int HALF0 = 50;
  localparam int HALF1 = 170;
  localparam int unsigned F0 = 340;   // relative frequencies (1/period)
  localparam int unsigned F1 = 100;
  localparam int N = 3;

  // timer watching clk0 is timed by clk1, and the other way round
  localparam int unsigned SA0 = timer_min_stages(F1, F0);
  localparam int unsigned SA1 = timer_min_stages(F0, F1);
  localparam int unsigned SC0 = SA0 + 2;
  localparam int unsigned SC1 = SA1 + 2;

  logic clk0 = 1'b0, clk1 = 1'b0;
  bit   run0 = 1'b1, run1 = 1'b1;
  logic idle = 1'b0;
  logic sel = 1'b0;
  logic clko[N], en0[N], en1[N], dis0[N], dis1[N];
  bit   act[N];
  bit   steady = 1'b0;   // both clocks have been running for a while
  int   st0[N], st1[N];
  int   checks = 0, failures = 0;
  longint t_last[N];

  stopclk_mux #(.STAGES0(SA0), .STAGES1(SA1), .ACT_MODE0(ACT_DIRECT), .ACT_MODE1(ACT_DIRECT)) u_dut0 (
    .clk0_i(clk0), .clk1_i(clk1), .sel_i(sel), .clk_o(clko[0]),
    .en_clk0_o(en0[0]), .en_clk1_o(en1[0]), .disable_clk0_o(dis0[0]), .disable_clk1_o(dis1[0]));
  stopclk_mux #(.STAGES0(SA0), .STAGES1(SA1), .ACT_MODE0(ACT_INVERTED), .ACT_MODE1(ACT_INVERTED)) u_dut1 (
    .clk0_i(clk0), .clk1_i(clk1), .sel_i(sel), .clk_o(clko[1]),
    .en_clk0_o(en0[1]), .en_clk1_o(en1[1]), .disable_clk0_o(dis0[1]), .disable_clk1_o(dis1[1]));
  stopclk_mux #(.STAGES0(SC0), .STAGES1(SC1), .USE_COUNTER(1'b1),
                .ACT_MODE0(ACT_TRANSITION), .ACT_MODE1(ACT_TRANSITION), .TD_DELAY(2)) u_dut2 (
    .clk0_i(clk0), .clk1_i(clk1), .sel_i(sel), .clk_o(clko[2]),
    .en_clk0_o(en0[2]), .en_clk1_o(en1[2]), .disable_clk0_o(dis0[2]), .disable_clk1_o(dis1[2]));

  initial begin
    st0[0] = SA0; st1[0] = SA1;
    st0[1] = SA0; st1[1] = SA1;
    st0[2] = SC0; st1[2] = SC1;
    for (int i = 0; i < N; i++) begin act[i] = 1'b0; t_last[i] = 0; end
  end

  // clocks stop at the level "idle"
  initial forever begin #HALF0; if (run0 || clk0 != idle) clk0 = ~clk0; end
  initial begin #3; forever begin #HALF1; if (run1 || clk1 != idle) clk1 = ~clk1; end end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  for (genvar g = 0; g < N; g++) begin : g_mon
    always @(clko[g]) begin
      if (act[g]) check((longint'($time) - t_last[g]) >= longint'(HALF0),
                        $sformatf("dut%0d: pulse of %0d on clk_o", g, $time - t_last[g]));
      t_last[g] = $time;
    end
    // a timer must never time out while the clock it watches runs
    always @(posedge dis0[g] or posedge dis1[g])
      if (act[g] && steady) check(1'b0, $sformatf("dut%0d: timeout while both clocks run", g));
    always @(en0[g] or en1[g]) if (act[g]) check(!(en0[g] && en1[g]), $sformatf("dut%0d: both enables high", g));
  end

  task automatic check_follow(input int n);
    for (int k = 0; k < n; k++) begin
      if (sel) @(clk1); else @(clk0);
      #7;
      for (int i = 0; i < N; i++)
        if (act[i]) check(clko[i] == (sel ? clk1 : clk0), $sformatf("dut%0d: clk_o follows clk%0d", i, sel));
    end
  endtask

  function automatic int max_stages(input bit which);
    int m = 0;
    for (int i = 0; i < N; i++) if (act[i]) m = ((which ? st1[i] : st0[i]) > m) ? (which ? st1[i] : st0[i]) : m;
    return m;
  endfunction

  // Switch away from the stopped clock "from"; the other clock times out.
  task automatic stopped_switch(input bit from);
    int lim = max_stages(from) + 2;
    if (from == 1'b0) begin @(negedge clk1); #5; end
    else              begin @(negedge clk0); #5; end
    sel = ~from;
    for (int n = 1; n <= lim; n++) begin
      if (from == 1'b0) @(posedge clk1); else @(posedge clk0);
      #1;
      for (int i = 0; i < N; i++) if (act[i]) begin
        int s = from ? st1[i] : st0[i];
        check((from ? dis1[i] : dis0[i]) == (n >= s), $sformatf("dut%0d: disable after edge %0d (stages %0d)", i, n, s));
        if (n >= s) check(!(from ? en1[i] : en0[i]), $sformatf("dut%0d: old enable cleared", i));
        check((from ? en0[i] : en1[i]) == (n >= s + 2), $sformatf("dut%0d: new enable after rising edge %0d", i, n));
      end
      if (from == 1'b0) @(negedge clk1); else @(negedge clk0);
      #1;
      for (int i = 0; i < N; i++) if (act[i]) begin
        int s = from ? st1[i] : st0[i];
        check((from ? en0[i] : en1[i]) == (n >= s + 1), $sformatf("dut%0d: new enable after falling edge %0d", i, n));
      end
    end
  endtask

  task automatic run_phase(input logic lvl, input int a, input int b);
    string ph = lvl ? "B" : "A";
    idle = lvl;
    run0 = 1'b1; run1 = 1'b1; sel = 1'b0;
    repeat (12) @(posedge clk1);
    @(negedge clk0); #1;
    act[a] = 1'b1; act[b] = 1'b1;
    steady = 1'b1;
    for (int i = 0; i < N; i++) if (act[i]) check(en0[i] && !en1[i], $sformatf("phase %s dut%0d: clk0 selected", ph, i));
    check_follow(8);

    // both clocks running: behaves like the conventional switch
    @(negedge clk0); #5; sel = 1'b1;
    repeat (3) @(negedge clk1);
    for (int i = 0; i < N; i++) if (act[i]) check(en1[i] && !dis0[i] && !dis1[i], $sformatf("dut%0d: running switch to clk1", i));
    check_follow(8);
    @(negedge clk1); #5; sel = 1'b0;
    repeat (3) @(negedge clk0);
    @(negedge clk1); repeat (3) @(negedge clk0);
    for (int i = 0; i < N; i++) if (act[i]) check(en0[i] && !dis0[i] && !dis1[i], $sformatf("dut%0d: running switch to clk0", i));
    check_follow(8);

    // clk0 stops while selected, then switch to clk1
    steady = 1'b0;
    run0 = 1'b0;
    repeat (4) @(posedge clk1);
    stopped_switch(1'b0);
    check_follow(6);

    // back to clk0 while it is still stopped: no clock comes out
    @(negedge clk1); #5; sel = 1'b0;
    repeat (max_stages(1'b0) + 2) @(negedge clk1);
    #1;
    for (int i = 0; i < N; i++) if (act[i]) begin
      check(!en0[i] && !en1[i] && !dis0[i], $sformatf("dut%0d: quiet while selected clock stopped", i));
      check(clko[i] == 1'b0, $sformatf("dut%0d: clk_o low while selected clock stopped", i));
    end

    // clk0 comes back
    run0 = 1'b1;
    repeat (3) @(negedge clk0);
    #1;
    for (int i = 0; i < N; i++) if (act[i]) check(en0[i], $sformatf("dut%0d: clk0 enabled on restart", i));
    steady = 1'b1;
    check_follow(6);

    // switch to clk1 while running, stop clk1, switch back to clk0
    @(negedge clk0); #5; sel = 1'b1;
    repeat (3) @(negedge clk1);
    check_follow(4);
    steady = 1'b0;
    run1 = 1'b0;
    repeat (4) @(posedge clk0);
    stopped_switch(1'b1);
    check_follow(6);
    run1 = 1'b1;
    repeat (6) @(posedge clk1);
    steady = 1'b1;
    check_follow(4);
    steady = 1'b0;

    act[a] = 1'b0; act[b] = 1'b0;
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_phase(1'b0, 0, 2);
    run_phase(1'b1, 1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
