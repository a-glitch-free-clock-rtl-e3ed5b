// cfg_clocking_top: clocking of the configuration registers of a radiation-
// hard SERDES, built around the stoppable-clock multiplexer.
//
// The configuration registers (tmr_cfg_reg) must be clocked at all times so
// that their TMR refresh keeps repairing upsets. In normal operation the TX
// input clock drives them; while an SPI transfer is in progress the SPI clock
// drives them, so that SPI writes land in the registers. stopclk_mux picks
// between the two: clk0 = tx_clk_i, clk1 = spi_clk_i, sel = spi_mode_i. The
// SPI clock only toggles during a transfer, so the switch back to the TX clock
// has to start from a stopped clock, which is the case the multiplexer's
// activity timers are there for.
//
// The SPI slave itself is not part of this RTL: its register write port
// (wr_en_i, wr_addr_i, wr_data_i, synchronous to the SPI clock) is brought
// out as ports. cfg_clk_o and the enable/disable outputs let the clock
// switching be observed.
//
// The use of the multiplexer for these registers follows the published
// application; register count and width and the write port are this design's
// choices.
module cfg_clocking_top
  import clkmux_pkg::*;
#(
  parameter int unsigned NUM_REGS = 4,
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned STAGES0  = 2,
  parameter int unsigned STAGES1  = 2,
  localparam int unsigned AW      = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1
) (
  input  logic                           tx_clk_i,
  input  logic                           spi_clk_i,
  input  logic                           spi_mode_i,    // 1: SPI transfer in progress
  input  logic                           rst_ni,
  input  logic                           wr_en_i,
  input  logic [AW-1:0]                  wr_addr_i,
  input  logic [WIDTH-1:0]               wr_data_i,
  output logic [NUM_REGS-1:0][WIDTH-1:0] cfg_o,
  output logic                           cfg_clk_o,
  output logic                           en_tx_o,
  output logic                           en_spi_o,
  output logic                           disable_tx_o,
  output logic                           disable_spi_o
);

  stopclk_mux #(
    .STAGES0 (STAGES0),
    .STAGES1 (STAGES1)
  ) u_clkmux (
    .clk0_i         (tx_clk_i),
    .clk1_i         (spi_clk_i),
    .sel_i          (spi_mode_i),
    .clk_o          (cfg_clk_o),
    .en_clk0_o      (en_tx_o),
    .en_clk1_o      (en_spi_o),
    .disable_clk0_o (disable_tx_o),
    .disable_clk1_o (disable_spi_o)
  );

  tmr_cfg_reg #(
    .NUM_REGS (NUM_REGS),
    .WIDTH    (WIDTH)
  ) u_cfg (
    .clk_i     (cfg_clk_o),
    .rst_ni    (rst_ni),
    .wr_en_i   (wr_en_i),
    .wr_addr_i (wr_addr_i),
    .wr_data_i (wr_data_i),
    .cfg_o     (cfg_o)
  );

endmodule
