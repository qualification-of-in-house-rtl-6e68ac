// rpm: constant-elapsed-time (CET) digital speedometer.
//
// A magnetic speed sensor, amplified and squared by an analog front end
// outside this design, delivers PULSES_PER_REV pulses per shaft
// revolution on `data_in`. The design counts the rising edges of that
// pulse train during fixed windows of GATE_SECONDS and converts the count
// to revolutions per minute:
//   data_out = (pulses in window) * 60 / PULSES_PER_REV   (GATE_SECONDS = 1)
// Two counters take turns. During window A count1 fills and count2 is held
// at zero; during window B count2 fills and count1 is held at zero. The sum
// of the two, scaled, is `data_out`, so `data_out` rises as pulses arrive
// and reaches the speed of the window just ended on the first cycle of the
// next window; the next cycle it restarts from the new window's count.
//
//   data_in --> edge_detect --rise--> pulse_counter count1 --+
//                                  \-> pulse_counter count2 --+-> rpm_scale --> data_out
//   gate_timer --win--> enables/clears of the two counters
//
// Interface: clk (system clock, CLK_HZ), reset (synchronous, active high),
// data_in (asynchronous sensor pulses), data_out (DATA_W-bit RPM),
// win (window in progress: 0 = count1 filling, 1 = count2 filling),
// window_done (one-cycle strobe: data_out now holds the complete speed of
// the window that just ended).
// Timing: a pulse shows in data_out 3 clock cycles after its rising edge
// (2 synchroniser stages plus the counter). Every window is
// CLK_HZ * GATE_SECONDS cycles long.
// The window scheme, the ports clk/reset/data_in/data_out, the 32-bit
// width, the factor 60 and the 16 pulses per revolution follow the
// design description. The synchronous single-clock structure, the
// synchroniser, `win` and `window_done` are this implementation's own.
`timescale 1ns / 1ps
module rpm
  import rpm_pkg::*;
#(
  parameter int unsigned CLK_HZ_P       = CLK_HZ,
  parameter int unsigned GATE_SECONDS_P = GATE_SECONDS,
  parameter int unsigned PPR            = PULSES_PER_REV,
  parameter int unsigned W              = DATA_W
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         data_in,
  output logic [W-1:0] data_out,
  output window_e      win,
  output logic         window_done
);

  localparam int unsigned GATE_CYCLES = CLK_HZ_P * GATE_SECONDS_P;

  logic         rise;
  logic         tick;
  logic [W-1:0] count1;
  logic [W-1:0] count2;

  edge_detect #(.SYNC_STAGES(2)) u_edge (
    .clk   (clk),
    .reset (reset),
    .din   (data_in),
    .rise  (rise)
  );

  gate_timer #(.GATE_CYCLES(GATE_CYCLES)) u_gate (
    .clk   (clk),
    .reset (reset),
    .win   (win),
    .tick  (tick)
  );

  pulse_counter #(.W(W)) u_count1 (
    .clk   (clk),
    .reset (reset),
    .clear (win == WIN_B),
    .en    (win == WIN_A),
    .inc   (rise),
    .count (count1)
  );

  pulse_counter #(.W(W)) u_count2 (
    .clk   (clk),
    .reset (reset),
    .clear (win == WIN_A),
    .en    (win == WIN_B),
    .inc   (rise),
    .count (count2)
  );

  // The ending window's counter is cleared one cycle after the switch, and
  // the new one is still zero then: that cycle data_out is the full count.
  always_ff @(posedge clk) begin
    if (reset) window_done <= 1'b0;
    else       window_done <= tick;
  end

  // With GATE_SECONDS = 1 the RPM factor is 60; a longer window divides it.
  rpm_scale #(
    .W              (W),
    .RPM_FACTOR     (SECONDS_PER_MINUTE / GATE_SECONDS_P),
    .PULSES_PER_REV (PPR)
  ) u_scale (
    .count_a  (count1),
    .count_b  (count2),
    .data_out (data_out)
  );

  // Only one counter may hold a count except on the first cycle of a window.
  a_one_counter : assert property (@(posedge clk) disable iff (reset)
    !window_done |-> (count1 == '0 || count2 == '0));

  initial begin
    assert (SECONDS_PER_MINUTE % GATE_SECONDS_P == 0)
      else $fatal(1, "rpm: GATE_SECONDS must divide 60");
  end

endmodule
