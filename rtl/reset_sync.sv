// reset_sync: clock and reset conditioning for the switch.
//
// The switch runs from one clock and one active-low reset. The reset input
// may fall at any time; this block asserts its output at once (asynchronously)
// and releases it only after STAGES rising clock edges with rst_n_in high, so
// every register leaves reset on the same edge and no flip-flop sees the
// release close to a clock edge. The single clock and the active-low reset
// follow the published design; the two-flop release synchroniser is this
// design's choice of how to apply that reset safely.
//
// Interface: clk, rst_n_in (raw active-low reset), rst_n_out (synchronised).
// Timing: rst_n_out goes low with rst_n_in and high on the STAGES-th rising
// edge after rst_n_in goes high.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic [STAGES-1:0] sync_q;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) sync_q <= '0;
    else           sync_q <= {sync_q[STAGES-2:0], 1'b1};
  end

  assign rst_n_out = sync_q[STAGES-1];

endmodule
