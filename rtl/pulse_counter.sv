// pulse_counter: one of the two window counters (count1 / count2) of the
// speedometer.
//
// While its window is active (`en` high) the counter adds one for every
// pulse strobe `inc`. While the other window is active (`clear` high) it is
// held at zero, so that the sum of both counters always equals the count of
// the window in progress. The count wraps at 2**W; with one-second windows
// and W = 32 that would take more than 2**32 pulses in one second.
//
// Interface: clk, reset (synchronous, active high), clear, en, inc,
// count (W bits).
// Timing: `count` changes one cycle after the strobe. `clear` wins over
// `en`. The count-then-hold-at-zero behaviour follows the design
// description; the description builds it from latches clocked by the
// sensor pulses, and this version is a plain synchronous register.
`timescale 1ns / 1ps
module pulse_counter #(
  parameter int unsigned W = rpm_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         clear,
  input  logic         en,
  input  logic         inc,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (reset || clear) begin
      count <= '0;
    end else if (en && inc) begin
      count <= count + 1'b1;
    end
  end

endmodule
