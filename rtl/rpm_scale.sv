// rpm_scale: converts the pulse counts of the speedometer into RPM.
//
// The two window counters are added (only one is non-zero at any time)
// and the sum is converted with
//   data_out = ((count_a + count_b) * RPM_FACTOR) / PULSES_PER_REV
// With one-second windows RPM_FACTOR is 60 (seconds per minute) and the
// sensor gives 16 pulses per revolution, so the division is a right shift
// by 4 and the multiplier is a constant 6-bit one, as in the description:
// one W-bit adder and one W x 6-bit constant multiplier. The result is
// truncated toward zero, so the resolution is 60/16 = 3.75 RPM.
//
// Interface: count_a, count_b (W bits each), data_out (W bits).
// Timing: purely combinational.
// The formula and widths follow the description. Requiring PULSES_PER_REV
// to be a power of two (so that no divider is needed) is this
// implementation's choice.
`timescale 1ns / 1ps
module rpm_scale #(
  parameter int unsigned W              = rpm_pkg::DATA_W,
  parameter int unsigned RPM_FACTOR     = rpm_pkg::SECONDS_PER_MINUTE,
  parameter int unsigned PULSES_PER_REV = rpm_pkg::PULSES_PER_REV
) (
  input  logic [W-1:0] count_a,
  input  logic [W-1:0] count_b,
  output logic [W-1:0] data_out
);

  localparam int unsigned FW    = $clog2(RPM_FACTOR + 1);      // 6 for 60
  localparam int unsigned SHIFT = $clog2(PULSES_PER_REV);      // 4 for 16
  localparam int unsigned PW    = W + FW;

  logic [W-1:0]  sum;
  logic [PW-1:0] product;

  always_comb begin
    sum      = count_a + count_b;
    product  = PW'(sum) * PW'(RPM_FACTOR);
    data_out = W'(product >> SHIFT);
  end

  initial begin
    assert ((1 << SHIFT) == PULSES_PER_REV)
      else $fatal(1, "rpm_scale: PULSES_PER_REV must be a power of two");
  end

endmodule
