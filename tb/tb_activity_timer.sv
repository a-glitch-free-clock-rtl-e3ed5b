// tb_activity_timer: self-checking test of the activity timer, chain form
// (3 stages) and counter form (5 stages) side by side.
//
// Both timers share one time-base clock, one data input and one reset. The
// test checks that (1) while the reset pulses more often than the chain is
// long the output never rises, (2) with the reset released the output rises
// on exactly the STAGES-th rising edge after the data input rose, (3) it falls
// again STAGES edges (chain) or 2 edges (counter) after the data input fell,
// and (4) the reset clears the output at once, without a clock edge.
module tb_activity_timer;

  localparam int unsigned S_CHAIN = 3;
  localparam int unsigned S_CNT   = 5;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic din = 1'b0;
  logic dout_chain, dout_cnt;
  int   checks = 0, failures = 0;

  activity_timer #(.STAGES(S_CHAIN), .USE_COUNTER(1'b0)) u_chain (
    .clk_i(clk), .rst_i(rst), .din_i(din), .dout_o(dout_chain));
  activity_timer #(.STAGES(S_CNT), .USE_COUNTER(1'b1)) u_cnt (
    .clk_i(clk), .rst_i(rst), .din_i(din), .dout_o(dout_cnt));

  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (chain=%b cnt=%b)", $time, what, dout_chain, dout_cnt);
    end
  endtask

  // Wait for a rising edge and look just after it.
  task automatic edge_after();
    @(posedge clk);
    #1;
  endtask

  initial begin
    #2000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reset held, din high: nothing may come out
    din = 1'b1;
    repeat (4) edge_after();
    check(!dout_chain && !dout_cnt, "outputs low while reset held");

    // reset pulsing every 2 clock periods (shorter than both timers)
    rst = 1'b0;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk); #3;
      if (i % 2 == 1) begin rst = 1'b1; #2 rst = 1'b0; end
      check(!dout_chain && !dout_cnt, "no timeout while watched clock runs");
    end

    // clean start: clear, then release with din low
    din = 1'b0;
    rst = 1'b1; #5 rst = 1'b0;
    repeat (6) edge_after();
    check(!dout_chain && !dout_cnt, "outputs low with din low");

    // arm between edges; count rising edges to the timeout
    @(negedge clk); din = 1'b1;
    for (int n = 1; n <= S_CNT; n++) begin
      edge_after();
      check(dout_chain == (n >= S_CHAIN), $sformatf("chain output after edge %0d", n));
      check(dout_cnt   == (n >= S_CNT),   $sformatf("counter output after edge %0d", n));
    end

    // disarm: chain empties after S_CHAIN edges, counter after 2
    @(negedge clk); din = 1'b0;
    for (int n = 1; n <= S_CHAIN; n++) begin
      edge_after();
      check(dout_chain == (n < S_CHAIN), $sformatf("chain release after edge %0d", n));
      check(dout_cnt   == (n < 2),       $sformatf("counter release after edge %0d", n));
    end

    // asynchronous clear: time out, then reset in the middle of a phase
    @(negedge clk); din = 1'b1;
    repeat (S_CNT) edge_after();
    check(dout_chain && dout_cnt, "both timed out");
    #4 rst = 1'b1;
    #1 check(!dout_chain && !dout_cnt, "reset clears outputs without clock edge");
    rst = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
