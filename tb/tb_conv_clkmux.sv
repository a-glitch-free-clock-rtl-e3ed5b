// tb_conv_clkmux: self-checking test of the conventional cross-coupled clock
// switch with disable inputs.
//
// clk0 has a half period of 50, clk1 of 170, offset so that their edges never
// coincide. The test checks: no pulse on clk_o shorter than the shortest half
// period (no glitch), never both enables high, clk_o following the selected
// clock in steady state, the switch-over cycle count (old enable falls at the
// falling edge after the next rising edge of the old clock, new enable rises
// likewise on the new clock), that a stopped selected clock leaves the switch
// stuck when the disables are low, and that the matching disable input
// releases it.
module tb_conv_clkmux;

  localparam int HALF0 = 50;
  localparam int HALF1 = 170;
  localparam int MIN_PULSE = HALF0;

  logic clk0 = 1'b0, clk1 = 1'b0;
  bit   run0 = 1'b1, run1 = 1'b1;
  logic sel = 1'b0;
  logic dis0 = 1'b0, dis1 = 1'b0;
  logic en0, en1, clko;
  bit   checking = 1'b0;
  int   checks = 0, failures = 0;
  longint t_last = 0;

  conv_clkmux u_dut (
    .clk0_i(clk0), .clk1_i(clk1), .sel_i(sel),
    .disable_clk0_i(dis0), .disable_clk1_i(dis1),
    .en_clk0_o(en0), .en_clk1_o(en1), .clk_o(clko));

  // clocks stop only at their low level
  initial forever begin #HALF0; if (run0 || clk0) clk0 = ~clk0; end
  initial begin #3; forever begin #HALF1; if (run1 || clk1) clk1 = ~clk1; end end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (sel=%b en0=%b en1=%b clko=%b)", $time, what, sel, en0, en1, clko);
    end
  endtask

  // glitch monitor: every pulse on clk_o at least one half period long
  always @(clko) begin
    if (checking) check((longint'($time) - t_last) >= longint'(MIN_PULSE), $sformatf("pulse of %0d on clk_o", $time - t_last));
    t_last = $time;
  end

  // mutual exclusion of the enables
  always @(en0 or en1) if (checking) check(!(en0 && en1), "both enables high");

  task automatic check_follow(input int n);
    for (int i = 0; i < n; i++) begin
      if (sel) begin @(clk1); #7; check(clko == clk1, "clk_o follows clk1"); end
      else     begin @(clk0); #7; check(clko == clk0, "clk_o follows clk0"); end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // settle from the arbitrary power-up state
    repeat (6) @(posedge clk1);
    @(clko);
    #1 checking = 1'b1;
    check(en0 && !en1, "clk0 enabled after power-up with sel=0");
    check_follow(10);

    // 0 -> 1 with both clocks running: exact edge counts
    @(negedge clk0); #5; sel = 1'b1;
    @(posedge clk0); #1 check(en0, "old enable still high after first rising edge");
    @(negedge clk0); #1 check(!en0, "old enable low at following falling edge");
    @(posedge clk1); #1 check(!en1, "new enable low after first clk1 rising edge");
    @(negedge clk1); #1 check(en1, "new enable high at following clk1 falling edge");
    check_follow(10);

    // 1 -> 0
    @(negedge clk1); #5; sel = 1'b0;
    @(posedge clk1); @(negedge clk1); #1 check(!en1, "clk1 enable dropped");
    @(posedge clk0); @(negedge clk0); #1 check(en0, "clk0 enable set");
    check_follow(10);

    // selected clock stops: the plain switch gets stuck
    run0 = 1'b0;
    repeat (3) @(posedge clk1);
    sel = 1'b1;
    repeat (8) @(posedge clk1);
    #1 check(en0 && !en1, "switch stuck with stopped clk0 and no disable");
    check(clko == 1'b0, "clk_o low while stuck");

    // disable_clk0 frees it
    @(negedge clk1); #5; dis0 = 1'b1;
    #1 check(!en0, "disable_clk0 clears en_clk0 at once");
    @(posedge clk1); @(negedge clk1); #1 check(en1, "clk1 enabled after disable");
    check_follow(6);

    // back to clk0 while it is still stopped: clk1 released, output quiet
    @(negedge clk1); #5; sel = 1'b0;
    repeat (2) @(negedge clk1);
    #1 check(!en1 && !en0, "no clock while the selected one is stopped");
    dis0 = 1'b0;
    run0 = 1'b1;
    repeat (3) @(negedge clk0);
    #1 check(en0, "clk0 enabled once it runs again");
    check_follow(6);

    // the other direction: clk1 selected and stopped, disable_clk1 frees it
    @(negedge clk0); #5; sel = 1'b1;
    repeat (3) @(negedge clk1);
    check_follow(4);
    run1 = 1'b0;
    repeat (6) @(posedge clk0);
    @(negedge clk0); #5; sel = 1'b0;
    repeat (6) @(posedge clk0);
    #1 check(en1 && !en0, "switch stuck with stopped clk1");
    dis1 = 1'b1;
    #1 check(!en1, "disable_clk1 clears en_clk1");
    @(posedge clk0); @(negedge clk0); #1 check(en0, "clk0 enabled after disable");
    check_follow(6);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
