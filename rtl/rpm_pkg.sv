// rpm_pkg: constants shared by the constant-elapsed-time (CET) speedometer.
//
// The speedometer counts the pulses of a magnetic speed sensor during a
// fixed window and converts the count to revolutions per minute:
//   RPM = pulses_in_window * 60 / (PULSES_PER_REV * window_seconds)
// The sensor wheel gives 16 pulses per revolution, the window is one
// second and the result is a 32-bit word; these numbers come from the
// design description. The 1 MHz system clock is the working frequency
// quoted for the reference design; the clock is otherwise a free choice.
`timescale 1ns / 1ps
package rpm_pkg;

  // Width of the pulse counters and of the RPM result.
  localparam int unsigned DATA_W = 32;

  // Seconds per minute: the constant multiplier of the RPM conversion.
  localparam int unsigned SECONDS_PER_MINUTE = 60;

  // Sensor pulses per shaft revolution.
  localparam int unsigned PULSES_PER_REV = 16;

  // System clock frequency in Hz (1 us period).
  localparam int unsigned CLK_HZ = 1_000_000;

  // Length of one counting window in seconds.
  localparam int unsigned GATE_SECONDS = 1;

  // Which of the two counters is filling. Window A uses count1,
  // window B uses count2; the windows alternate.
  typedef enum logic {
    WIN_A = 1'b0,
    WIN_B = 1'b1
  } window_e;

endpackage
