// tmr_cfg_reg: bank of configuration registers built from triple-modular-
// redundant (TMR) flip-flops with continuous refresh.
//
// Every register bit is stored three times. The value seen outside is the
// bitwise majority of the three copies. On every rising edge of clk_i each
// copy is reloaded: with wr_data_i for the register addressed by wr_addr_i
// when wr_en_i is high, and with the voted value otherwise. A single-event
// upset in one copy is therefore outvoted at once and repaired at the next
// clock edge, so upsets cannot pile up as long as the clock runs. That is why
// the registers need a clock in every mode: in the application the clock is
// the output of stopclk_mux, the TX clock in normal operation and the SPI
// clock while an SPI transfer is under way.
//
// rst_ni is an active-low asynchronous reset that loads RESET_VALUE into all
// copies. Writes take effect at the clock edge that samples wr_en_i; cfg_o
// follows in the same cycle. The copies and their processes carry keep
// attributes so that synthesis does not merge the identical flops.
//
// TMR flip-flops, refresh and the clocking scheme follow the published
// application; the register count, width, write port and reset are this
// design's own choices, as the application does not give them.
module tmr_cfg_reg #(
  parameter int unsigned       NUM_REGS    = 4,
  parameter int unsigned       WIDTH       = 8,
  parameter logic [WIDTH-1:0]  RESET_VALUE = '0,
  localparam int unsigned      AW          = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  logic                          wr_en_i,
  input  logic [AW-1:0]                 wr_addr_i,
  input  logic [WIDTH-1:0]              wr_data_i,
  output logic [NUM_REGS-1:0][WIDTH-1:0] cfg_o
);

  // copy_q[c][r]: copy c of register r
  // kept apart in synthesis: the copies are logically identical and would
  // otherwise be merged into one
  (* keep *) logic [2:0][NUM_REGS-1:0][WIDTH-1:0] copy_q;

  always_comb begin
    for (int r = 0; r < NUM_REGS; r++) begin
      cfg_o[r] = (copy_q[0][r] & copy_q[1][r]) |
                 (copy_q[0][r] & copy_q[2][r]) |
                 (copy_q[1][r] & copy_q[2][r]);
    end
  end

  for (genvar c = 0; c < 3; c++) begin : g_copy
    (* keep *) always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        copy_q[c] <= {NUM_REGS{RESET_VALUE}};
      end else begin
        for (int r = 0; r < NUM_REGS; r++) begin
          if (wr_en_i && wr_addr_i == AW'(r)) copy_q[c][r] <= wr_data_i;
          else                                copy_q[c][r] <= cfg_o[r];
        end
      end
    end
  end

endmodule
