// gate_timer: generates the alternating one-second counting windows.
//
// A down-counter divides the system clock by GATE_CYCLES. On the last cycle
// of each window it raises `tick` for one cycle, and at the end of that
// cycle the window-select flag `win` flips, so the two pulse counters take
// turns: window A (win = 0) fills count1, window B (win = 1) fills count2.
// `win` is the signal the design description calls cnt.
//
// Interface: clk, reset (synchronous, active high), win (current window),
// tick (high during the last cycle of every window).
// Timing: every window lasts exactly GATE_CYCLES clock cycles; after reset
// the first window is window A. With the default 1 MHz clock, GATE_CYCLES
// of 1,000,000 gives the one-second window of the description. Building
// the one-second window from the system clock, instead of feeding a
// separate 1 Hz clock, is this implementation's choice.
`timescale 1ns / 1ps
module gate_timer
  import rpm_pkg::*;
#(
  parameter int unsigned GATE_CYCLES = CLK_HZ * GATE_SECONDS
) (
  input  logic    clk,
  input  logic    reset,
  output window_e win,
  output logic    tick
);

  localparam int unsigned CW = (GATE_CYCLES > 1) ? $clog2(GATE_CYCLES) : 1;
  localparam logic [CW-1:0] LAST = CW'(GATE_CYCLES - 1);

  logic [CW-1:0] remain_q;  // cycles left in the window, minus one

  always_ff @(posedge clk) begin
    if (reset) begin
      remain_q <= LAST;
      win      <= WIN_A;
    end else if (tick) begin
      remain_q <= LAST;
      win      <= (win == WIN_A) ? WIN_B : WIN_A;
    end else begin
      remain_q <= remain_q - 1'b1;
    end
  end

  assign tick = (remain_q == '0);

  initial begin
    assert (GATE_CYCLES >= 2)
      else $fatal(1, "gate_timer: GATE_CYCLES must be at least 2");
  end

endmodule
