// tb_edge_detect: self-checking test of the input synchroniser and
// rising-edge detector.
//
// A random pulse train is applied on the falling clock edge. The test keeps
// its own record of the input as sampled at each rising clock edge and
// expects `rise` to be high exactly when the sample taken two edges ago is
// 1 and the one before it is 0 (two synchroniser stages). It also checks
// that reset clears the pipeline and that a steady input never strobes.
`timescale 1ns/1ps
module tb_edge_detect;

  logic clk = 1'b0;
  logic reset;
  logic din;
  logic rise;

  int checks = 0;
  int failures = 0;
  int rises_seen = 0;

  edge_detect #(.SYNC_STAGES(2)) dut (.clk(clk), .reset(reset), .din(din), .rise(rise));

  always #5 clk = ~clk;

  // samples[0] is the most recent rising-edge sample of din.
  logic [2:0] samples;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    din   = 1'b0;
    samples = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(rise, 1'b0, "rise during reset");
    reset = 1'b0;
    // Random pulse train; samples track what the flip-flops see.
    for (int i = 0; i < 2000; i++) begin
      din = ($urandom_range(0, 3) == 0) ? ~din : din;
      @(posedge clk);
      samples = {samples[1:0], din};
      @(negedge clk);
      // rise = sample from one edge ago high and sample from two edges ago low
      check(rise, samples[1] & ~samples[2], "rise vs reference");
      if (rise) rises_seen++;
    end
    // A steady high input must give no more strobes.
    din = 1'b1;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      check(rise, 1'b0, "steady high");
    end
    // Reset in the middle of a pulse clears the pipeline.
    reset = 1'b1;
    @(negedge clk);
    check(rise, 1'b0, "rise in reset");
    din = 1'b0;
    reset = 1'b0;
    repeat (3) @(negedge clk);
    check(rise, 1'b0, "after reset, low input");
    checks++;
    if (rises_seen < 50) begin
      failures++;
      $display("FAIL too few edges exercised: %0d", rises_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
