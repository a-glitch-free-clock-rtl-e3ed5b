// tb_transition_detect: self-checking test of the delay-and-XOR transition
// detector model.
//
// A signal is toggled at random intervals (all longer than the delay) and
// then left at a high and at a low level. After every edge the output must be
// high for exactly DELAY time units and low afterwards; a signal resting at
// either level must give no output.
module tb_transition_detect;

  localparam int unsigned DELAY = 4;

  logic sig = 1'b0;
  logic pulse;
  int   checks = 0, failures = 0;
  int   npulses = 0;

  transition_detect #(.DELAY(DELAY)) u_dut (.sig_i(sig), .pulse_o(pulse));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (sig=%b pulse=%b)", $time, what, sig, pulse);
    end
  endtask

  always @(posedge pulse) npulses++;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gap;
    #20;
    check(pulse == 1'b0, "no pulse while resting low");
    npulses = 0;
    for (int i = 0; i < 40; i++) begin
      sig = ~sig;
      #1 check(pulse == 1'b1, "pulse right after edge");
      #(DELAY - 2) check(pulse == 1'b1, "pulse still high before DELAY");
      #2 check(pulse == 1'b0, "pulse over after DELAY");
      gap = 2 + int'($urandom_range(20));
      repeat (gap) #1;
      check(pulse == 1'b0, "no pulse between edges");
    end
    sig = 1'b1;
    #50 check(pulse == 1'b0, "no pulse while resting high");
    check(npulses == 41, $sformatf("one pulse per edge (%0d)", npulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
