// tb_rpm_full: the speedometer at its default size, 1 MHz clock and
// one-second windows, through two complete windows.
//
// Window A (count1) receives 4 sensor pulses spread over the second, which
// at 16 pulses per revolution is 0.25 rev/s, 15 RPM. Window B (count2)
// receives 1600 pulses, 100 rev/s, 6000 RPM. The test checks that each
// window lasts exactly 1,000,000 clock cycles (window_done arrives on
// cycles 1,000,000 and 2,000,000 after reset) and that data_out then holds
// 15 and 6000.
`timescale 1ns/1ps
module tb_rpm_full;
  import rpm_pkg::*;

  localparam int unsigned G = 1_000_000;  // cycles per second at 1 MHz

  logic        clk = 1'b0;
  logic        reset;
  logic        data_in;
  logic [31:0] data_out;
  window_e     win;
  logic        window_done;

  int checks = 0;
  int failures = 0;

  rpm dut (
    .clk(clk), .reset(reset), .data_in(data_in),
    .data_out(data_out), .win(win), .window_done(window_done)
  );

  always #500 clk = ~clk;  // 1 us period

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #2500ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned cycle;
  int unsigned done_cycles [$];
  int unsigned done_values [$];

  // Record every window_done: when it came and what data_out held.
  always @(negedge clk) begin
    if (!reset) begin
      if (window_done) begin
        done_cycles.push_back(cycle);
        done_values.push_back(data_out);
      end
      cycle <= cycle + 1;
    end
  end

  // Pulse spacing in cycles for n evenly spread pulses in one window.
  task automatic pulses(input int unsigned n);
    int unsigned spacing;
    spacing = G / n;
    for (int unsigned p = 0; p < n; p++) begin
      repeat (spacing / 2) @(negedge clk);
      data_in = 1'b1;
      repeat (spacing - spacing / 2) @(negedge clk);
      data_in = 1'b0;
    end
  endtask

  initial begin
    reset = 1'b1;
    data_in = 1'b0;
    cycle = 0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    // the last pulse of each window ends before the window does
    pulses(4);
    wait (win == WIN_B);
    @(negedge clk);
    pulses(1600);
    wait (done_cycles.size() == 2);
    check(done_cycles[0], G, "first window length");
    check(done_values[0], 15, "4 pulses in one second");
    check(done_cycles[1], 2 * G, "second window length");
    check(done_values[1], 6000, "1600 pulses in one second");
    $display("window A: %0d RPM at cycle %0d; window B: %0d RPM at cycle %0d",
             done_values[0], done_cycles[0], done_values[1], done_cycles[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
