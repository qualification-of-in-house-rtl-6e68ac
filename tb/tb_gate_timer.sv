// tb_gate_timer: self-checking test of the window generator.
//
// With a short window of 7 cycles the test counts clock cycles after reset
// and expects `tick` exactly on the last cycle of each window and `win` to
// be window A in even-numbered windows and window B in odd ones. A reset in
// the middle of a window must restart the count in window A.
`timescale 1ns/1ps
module tb_gate_timer;
  import rpm_pkg::*;

  localparam int unsigned G = 7;

  logic    clk = 1'b0;
  logic    reset;
  window_e win;
  logic    tick;

  int checks = 0;
  int failures = 0;

  gate_timer #(.GATE_CYCLES(G)) dut (.clk(clk), .reset(reset), .win(win), .tick(tick));

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cycles(input int n);
    // n cycles after reset release; cycle j is checked on its falling edge
    // (called on the falling edge where reset was released)
    for (int j = 0; j < n; j++) begin
      #1;
      check(int'(tick), int'((j % G) == G - 1), "tick position");
      check(int'(win), (j / G) % 2, "window select");
      @(negedge clk);
    end
  endtask

  initial begin
    reset = 1'b1;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    run_cycles(10 * G);
    // Reset part-way through a window
    repeat (3) @(negedge clk);
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    run_cycles(3 * G);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
