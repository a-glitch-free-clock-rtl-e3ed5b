// tb_stopclk_mux_stop_switch: the basic stopped-clock switch on a multiplexer
// with all parameters at their defaults (two-stage timers, direct resets).
//
// Sequence: clk0 is selected and running, clk1 runs as well; clk0 stops at
// its low level; sel then switches to clk1. Before the stop clk_o must follow
// clk0; after the switch it must follow clk1, with disable_clk0 rising on the
// second rising edge of clk1 after sel changed and en_clk1 on the falling
// edge after the third. The sequence is repeated for several stop and switch
// times. The clocks (half periods 75 and 50) are within a ratio of 2, for
// which the default timers are large enough. Every clk_o pulse must be at
// least the shorter half period long.
module tb_stopclk_mux_stop_switch;

  localparam int HALF0 = 75;
  localparam int HALF1 = 50;

  logic clk0 = 1'b0, clk1 = 1'b0;
  bit   run0 = 1'b1;
  logic sel = 1'b0;
  logic clko, en0, en1, dis0, dis1;
  bit   checking = 1'b0;
  longint t_last = 0;
  int   checks = 0, failures = 0;

  stopclk_mux u_dut (
    .clk0_i(clk0), .clk1_i(clk1), .sel_i(sel), .clk_o(clko),
    .en_clk0_o(en0), .en_clk1_o(en1), .disable_clk0_o(dis0), .disable_clk1_o(dis1));

  initial forever begin #HALF0; if (run0 || clk0) clk0 = ~clk0; end
  initial begin #11; forever #HALF1 clk1 = ~clk1; end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (sel=%b en=%b%b dis=%b%b)", $time, what, sel, en0, en1, dis0, dis1);
    end
  endtask

  always @(clko) begin
    if (checking) check((longint'($time) - t_last) >= longint'(HALF1), "short pulse on clk_o");
    t_last = $time;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8) @(posedge clk0);
    @(clko); #1 checking = 1'b1;
    for (int round = 0; round < 6; round++) begin
      // clk0 selected and running
      for (int k = 0; k < 6; k++) begin @(clk0); #5 check(clko == clk0, "clk_o follows clk0"); end
      check(!dis0 && !dis1, "no timeout while both run");
      // clk0 stops low, a few clk1 cycles later sel switches
      run0 = 1'b0;
      repeat (2 + round) @(posedge clk1);
      @(negedge clk1); repeat (3 + 4 * round) #1;
      sel = 1'b1;
      for (int n = 1; n <= 4; n++) begin
        @(posedge clk1); #1;
        check(dis0 == (n >= 2), $sformatf("disable_clk0 after clk1 rising edge %0d", n));
        check(en1 == (n >= 4), $sformatf("en_clk1 after clk1 rising edge %0d", n));
        @(negedge clk1); #1;
        check(en1 == (n >= 3), $sformatf("en_clk1 after clk1 falling edge %0d", n));
      end
      for (int k = 0; k < 6; k++) begin @(clk1); #5 check(clko == clk1, "clk_o follows clk1"); end
      // clk0 returns, selection goes back to it with both running
      run0 = 1'b1;
      repeat (3) @(posedge clk0);
      check(!dis0, "disable_clk0 released once clk0 runs");
      @(negedge clk0); #5 sel = 1'b0;
      repeat (3) @(negedge clk1);
      repeat (3) @(negedge clk0);
      #1 check(en0 && !en1, "back on clk0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
