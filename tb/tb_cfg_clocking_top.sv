// tb_cfg_clocking_top: end-to-end test of the configuration-register clocking
// with every parameter at its default.
//
// TX clock: half period 50; SPI clock: half period 70, and it only toggles
// during SPI transfers. The ratio (1.4) is one for which the default two-stage
// timers are large enough. The test runs normal operation on the TX clock,
// then SPI transfers that write the registers on the SPI clock, in both
// orders of "SPI clock starts" and "SPI mode selected", each ending with the
// SPI clock stopping before the return to the TX clock (the stopped-clock
// switch). It also stops the TX clock while it is selected and switches to SPI
// from there, and injects single upsets into one TMR copy. Checked: register
// contents against a reference, the voted output under upsets and their
// repair, no short pulse on the register clock, never both enables, the
// register clock following the selected clock, and the exact edge on which a
// stopped-clock switch raises its disable and enables the new clock. Each
// mechanism is counted and must occur at least once.
module tb_cfg_clocking_top;

  localparam int HALF_TX  = 50;
  localparam int HALF_SPI = 70;
  localparam int NUM_REGS = 4;
  localparam int WIDTH    = 8;
  localparam int STAGES   = 2;   // defaults of the top

  logic tx_clk = 1'b0, spi_clk = 1'b0;
  bit   run_tx = 1'b1, run_spi = 1'b1;
  logic spi_mode = 1'b0;
  logic rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [1:0] wr_addr = '0;
  logic [WIDTH-1:0] wr_data = '0;
  logic [NUM_REGS-1:0][WIDTH-1:0] cfg, ref_q;
  logic cfg_clk, en_tx, en_spi, dis_tx, dis_spi;
  bit   checking = 1'b0;
  longint t_last = 0;
  int   checks = 0, failures = 0;

  // mechanism counters
  int n_run_switch = 0;       // switch with both clocks running
  int n_to_dormant = 0;       // switch to a clock that is not yet running
  int n_stop_spi   = 0;       // switch away from a stopped SPI clock (timer)
  int n_stop_tx    = 0;       // switch away from a stopped TX clock (timer)
  int n_spi_write  = 0;       // register write clocked by the SPI clock
  int n_repair     = 0;       // single upset repaired by the refresh

  cfg_clocking_top u_dut (
    .tx_clk_i(tx_clk), .spi_clk_i(spi_clk), .spi_mode_i(spi_mode), .rst_ni(rst_n),
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data), .cfg_o(cfg),
    .cfg_clk_o(cfg_clk), .en_tx_o(en_tx), .en_spi_o(en_spi),
    .disable_tx_o(dis_tx), .disable_spi_o(dis_spi));

  // both clocks rest low when stopped
  initial forever begin #HALF_TX; if (run_tx || tx_clk) tx_clk = ~tx_clk; end
  initial begin #7; forever begin #HALF_SPI; if (run_spi || spi_clk) spi_clk = ~spi_clk; end end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (mode=%b en_tx=%b en_spi=%b dis_tx=%b dis_spi=%b)",
               $time, what, spi_mode, en_tx, en_spi, dis_tx, dis_spi);
    end
  endtask

  always @(cfg_clk) begin
    if (checking) check((longint'($time) - t_last) >= longint'(HALF_TX), $sformatf("pulse of %0d on register clock", $time - t_last));
    t_last = $time;
  end
  always @(en_tx or en_spi) if (checking) check(!(en_tx && en_spi), "both enables high");

  task automatic check_regs(input string what);
    for (int r = 0; r < NUM_REGS; r++)
      check(cfg[r] == ref_q[r], $sformatf("%s: reg %0d = %h, expected %h", what, r, cfg[r], ref_q[r]));
  endtask

  task automatic check_follow(input int n);
    for (int k = 0; k < n; k++) begin
      if (spi_mode) @(spi_clk); else @(tx_clk);
      #7 check(cfg_clk == (spi_mode ? spi_clk : tx_clk), "register clock follows selected clock");
    end
  endtask

  // SPI writes, launched on the falling SPI edge, captured on the rising one
  task automatic spi_writes(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge spi_clk); #3;
      wr_en   = 1'b1;
      wr_addr = 2'($urandom_range(NUM_REGS - 1));
      wr_data = WIDTH'($urandom);
      @(posedge spi_clk);
      ref_q[wr_addr] = wr_data;
      #2 check_regs("after SPI write");
      n_spi_write++;
    end
    @(negedge spi_clk); #3 wr_en = 1'b0;
  endtask

  // one copy of one bit flipped; must be masked now and repaired by next edge
  task automatic upset_and_repair();
    logic [2:0][NUM_REGS-1:0][WIDTH-1:0] v;
    int c = $urandom_range(2), r = $urandom_range(NUM_REGS - 1), b = $urandom_range(WIDTH - 1);
    if (spi_mode) @(negedge spi_clk); else @(negedge tx_clk);
    #3;
    v = u_dut.u_cfg.copy_q;
    v[c][r][b] = ~v[c][r][b];
    force u_dut.u_cfg.copy_q = v;
    #1 release u_dut.u_cfg.copy_q;
    #1 check_regs("upset masked");
    if (spi_mode) @(posedge spi_clk); else @(posedge tx_clk);
    #1;
    check(u_dut.u_cfg.copy_q[0] == u_dut.u_cfg.copy_q[1] &&
          u_dut.u_cfg.copy_q[1] == u_dut.u_cfg.copy_q[2], "upset repaired by refresh");
    if (u_dut.u_cfg.copy_q[c][r][b] == ref_q[r][b]) n_repair++;
  endtask

  // switch away from the stopped clock; the running one times it out
  task automatic stopped_switch(input bit from_spi);
    if (from_spi) begin @(negedge tx_clk); #5; end
    else          begin @(negedge spi_clk); #5; end
    spi_mode = ~from_spi;
    for (int n = 1; n <= STAGES + 2; n++) begin
      if (from_spi) @(posedge tx_clk); else @(posedge spi_clk);
      #1;
      check((from_spi ? dis_spi : dis_tx) == (n >= STAGES), $sformatf("disable after rising edge %0d", n));
      check((from_spi ? en_tx : en_spi) == (n >= STAGES + 2), $sformatf("new enable after rising edge %0d", n));
      if (from_spi) @(negedge tx_clk); else @(negedge spi_clk);
      #1 check((from_spi ? en_tx : en_spi) == (n >= STAGES + 1), $sformatf("new enable after falling edge %0d", n));
    end
    if (from_spi) n_stop_spi++; else n_stop_tx++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    // power-up: both clocks run for a few cycles so that the switch settles
    // from its arbitrary start state (in a two-state simulator a disable that
    // starts high gives its asynchronous reset no edge), then the SPI clock
    // goes idle; the registers are reset meanwhile
    repeat (3) @(posedge spi_clk);
    run_spi = 1'b0;
    #3 rst_n = 1'b1;
    repeat (6) @(posedge tx_clk);
    @(cfg_clk); #1 checking = 1'b1;
    check(en_tx && !en_spi, "TX clock selected after power-up");
    check_regs("after reset");
    check_follow(10);
    upset_and_repair();

    // transfer 1: SPI clock starts first, then SPI mode (both running)
    run_spi = 1'b1;
    repeat (3) @(posedge spi_clk);
    @(negedge tx_clk); #5 spi_mode = 1'b1;
    repeat (2) @(posedge tx_clk);
    repeat (3) @(negedge spi_clk);
    #1 check(en_spi && !en_tx && !dis_tx && !dis_spi, "switched to SPI clock, both running");
    n_run_switch++;
    check_follow(6);
    spi_writes(5);
    upset_and_repair();
    // transfer ends: SPI clock stops, then back to TX (stopped-clock switch)
    run_spi = 1'b0;
    repeat (3) @(posedge tx_clk);
    stopped_switch(1'b1);
    check_follow(10);
    check_regs("TX clock again after transfer 1");
    upset_and_repair();

    // transfer 2: SPI mode first while the SPI clock is still stopped
    @(negedge tx_clk); #5 spi_mode = 1'b1;
    repeat (3) @(negedge tx_clk);
    #1 check(!en_tx && !en_spi && cfg_clk == 1'b0, "no clock until the SPI clock starts");
    run_spi = 1'b1;
    repeat (3) @(negedge spi_clk);
    #1 check(en_spi, "SPI clock enabled when it starts");
    n_to_dormant++;
    check_follow(6);
    spi_writes(6);
    run_spi = 1'b0;
    repeat (3) @(posedge tx_clk);
    stopped_switch(1'b1);
    check_follow(6);

    // TX clock fails while selected; a transfer starts and times it out
    run_tx = 1'b0;
    run_spi = 1'b1;
    repeat (4) @(posedge spi_clk);
    check(en_tx && !dis_tx, "TX still selected, stopped");
    stopped_switch(1'b0);
    check_follow(6);
    spi_writes(3);
    // TX clock comes back; the transfer ends normally with both running
    run_tx = 1'b1;
    repeat (6) @(posedge tx_clk);
    check(!dis_tx && !dis_spi, "disables released with both clocks running");
    @(negedge spi_clk); #5 spi_mode = 1'b0;
    repeat (2) @(posedge spi_clk);
    repeat (3) @(negedge tx_clk);
    #1 check(en_tx && !en_spi, "back on TX clock, both running");
    n_run_switch++;
    run_spi = 1'b0;
    check_follow(8);
    check_regs("end of run");

    check(n_run_switch > 0, "switch with both clocks running happened");
    check(n_to_dormant > 0, "switch to a dormant clock happened");
    check(n_stop_spi   > 0, "switch away from stopped SPI clock happened");
    check(n_stop_tx    > 0, "switch away from stopped TX clock happened");
    check(n_spi_write  > 0, "SPI-clocked register write happened");
    check(n_repair     > 0, "upset repair happened");
    $display("mechanisms: running=%0d dormant=%0d stop_spi=%0d stop_tx=%0d writes=%0d repairs=%0d",
             n_run_switch, n_to_dormant, n_stop_spi, n_stop_tx, n_spi_write, n_repair);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
