// tb_tmr_cfg_reg: self-checking test of the TMR configuration register bank.
//
// A reference array holds what each register should contain. The test
// resets the bank, writes random values to random registers, flips single
// copies of random bits (as a single-event upset would) and checks that the
// voted output never shows an upset and that the flipped copy is repaired at
// the next clock edge. It also shows that two upsets in the same bit before a
// refresh edge do change the output, i.e. that the vote really is a vote.
module tb_tmr_cfg_reg;

  localparam int unsigned NUM_REGS = 4;
  localparam int unsigned WIDTH    = 8;
  localparam int unsigned AW       = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [AW-1:0] wr_addr = '0;
  logic [WIDTH-1:0] wr_data = '0;
  logic [NUM_REGS-1:0][WIDTH-1:0] cfg;
  logic [NUM_REGS-1:0][WIDTH-1:0] ref_q;
  int checks = 0, failures = 0;

  tmr_cfg_reg #(.NUM_REGS(NUM_REGS), .WIDTH(WIDTH)) u_dut (
    .clk_i(clk), .rst_ni(rst_n), .wr_en_i(wr_en), .wr_addr_i(wr_addr),
    .wr_data_i(wr_data), .cfg_o(cfg));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic check_all(input string what);
    for (int r = 0; r < NUM_REGS; r++)
      check(cfg[r] == ref_q[r], $sformatf("%s: reg %0d = %h, expected %h", what, r, cfg[r], ref_q[r]));
  endtask

  // flip bit b of register r in copy c, as a particle strike would
  task automatic upset(input int c, input int r, input int b);
    logic [2:0][NUM_REGS-1:0][WIDTH-1:0] v;
    v = u_dut.copy_q;
    v[c][r][b] = ~v[c][r][b];
    force u_dut.copy_q = v;
    #1 release u_dut.copy_q;
  endtask

  initial begin
    #50000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check_all("after reset");

    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      wr_en   = ($urandom_range(1) == 1);
      wr_addr = AW'($urandom_range(NUM_REGS - 1));
      wr_data = WIDTH'($urandom);
      @(posedge clk);
      if (wr_en) ref_q[wr_addr] = wr_data;
      #1;
      check_all("after write cycle");
      wr_en = 1'b0;

      // one upset in one copy, between edges
      begin
        automatic int c = $urandom_range(2); automatic int r = $urandom_range(NUM_REGS - 1); automatic int b = $urandom_range(WIDTH - 1);
        #1 upset(c, r, b);
        #1 check_all("output masks a single upset");
        @(posedge clk); #1;
        check(u_dut.copy_q[0] == u_dut.copy_q[1] && u_dut.copy_q[1] == u_dut.copy_q[2],
              "copies equal again after one refresh edge");
      end
    end

    // two copies hit in the same bit: the vote follows them
    @(negedge clk);
    upset(0, 1, 3);
    upset(2, 1, 3);
    #1 check(cfg[1][3] != ref_q[1][3], "double upset is visible (vote works)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
