// activity_timer: watches one clock for activity, using the other clock as time base.
//
// The timer is a synchronizer chain of STAGES flip-flops. It is clocked by
// the *other* input clock of the multiplexer (clk_i), its data input is the
// "arm" request (din_i: high while the watched clock is not the selected
// one), and every flip-flop has an active-high asynchronous reset (rst_i)
// driven by the watched clock, directly or through an inverter or transition
// detector. While the watched clock runs, the chain is cleared again and
// again, so a 1 can never reach the end. Once the watched clock stops at its
// inactive level, the reset is released and the 1 on din_i walks through the
// chain: dout_i rises on the STAGES-th rising edge of clk_i after din_i rose.
// dout_o is the "disable" signal that forces the conventional switch to drop
// the watched clock.
//
// With USE_COUNTER set, a saturating binary counter replaces the long chain,
// which keeps large stage counts cheap when the two clock frequencies are far
// apart. It keeps the same rise latency (STAGES edges) and still registers its
// output, so the disable line cannot glitch; it clears its output two edges
// after din_i falls instead of STAGES edges.
//
// The chain structure, the clock/data/reset hook-up and the default of two
// stages follow the published architecture; the counter form is only hinted at
// there and its details are this design's own.
module activity_timer #(
  parameter int unsigned STAGES      = 2,
  parameter bit          USE_COUNTER = 1'b0
) (
  input  logic clk_i,   // time base: the other multiplexer clock
  input  logic rst_i,   // active-high asynchronous reset from the watched clock
  input  logic din_i,   // arm: watched clock is not selected
  output logic dout_o   // disable request for the watched clock
);

  if (STAGES < 2) begin : g_bad_stages
    $error("activity_timer: STAGES must be at least 2");
  end

  if (!USE_COUNTER) begin : g_chain
    logic [STAGES-1:0] chain_q;

    always_ff @(posedge clk_i or posedge rst_i) begin
      if (rst_i) chain_q <= '0;
      else       chain_q <= {chain_q[STAGES-2:0], din_i};
    end

    assign dout_o = chain_q[STAGES-1];
  end else begin : g_counter
    localparam int unsigned CW   = (STAGES - 2 < 1) ? 1 : $clog2(STAGES - 1);
    localparam int unsigned LAST = STAGES - 2;

    logic          sync_q;
    logic [CW-1:0] cnt_q;
    logic          out_q;

    always_ff @(posedge clk_i or posedge rst_i) begin
      if (rst_i) begin
        sync_q <= 1'b0;
        cnt_q  <= '0;
        out_q  <= 1'b0;
      end else begin
        sync_q <= din_i;
        out_q  <= sync_q && (cnt_q == CW'(LAST));
        if (!sync_q)                  cnt_q <= '0;
        else if (cnt_q != CW'(LAST))  cnt_q <= cnt_q + 1'b1;
      end
    end

    assign dout_o = out_q;
  end

endmodule
