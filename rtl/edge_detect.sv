// edge_detect: brings the conditioned sensor pulse train into the clock
// domain and flags each rising edge.
//
// The speedometer counts positive edges of its input, which comes straight
// from the board's Schmitt trigger and is asynchronous to the system clock.
// SYNC_STAGES flip-flops remove metastability; one more flip-flop holds the
// previous sample, and `rise` is high for exactly one clock cycle when the
// synchronised input goes from 0 to 1.
//
// Interface: clk, reset (synchronous, active high), din (asynchronous
// pulse train), rise (one-cycle strobe).
// Timing: `rise` follows the input edge by SYNC_STAGES clock cycles. The
// input must stay high and low for at least one clock period each to be
// seen, so the highest countable pulse rate is half the clock rate.
// Counting positive edges follows the design description; the synchroniser
// is this implementation's choice. All flip-flops reset to 0, so an input
// that is already high when reset ends is counted as one edge.
`timescale 1ns / 1ps
module edge_detect #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic reset,
  input  logic din,
  output logic rise
);

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   prev_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      sync_q <= '0;
      prev_q <= 1'b0;
    end else begin
      sync_q <= {sync_q[SYNC_STAGES-2:0], din};
      prev_q <= sync_q[SYNC_STAGES-1];
    end
  end

  assign rise = sync_q[SYNC_STAGES-1] & ~prev_q;

  initial begin
    assert (SYNC_STAGES >= 2)
      else $fatal(1, "edge_detect: SYNC_STAGES must be at least 2");
  end

endmodule
