// tb_pulse_counter: self-checking test of one window counter.
//
// Random clear, enable and increment inputs are applied; a reference count
// kept by the test (zero on clear, +1 on enable and increment, clear
// winning) is compared with the counter every cycle. A second instance
// with a 4-bit width checks wrap-around.
`timescale 1ns/1ps
module tb_pulse_counter;

  logic        clk = 1'b0;
  logic        reset;
  logic        clear;
  logic        en;
  logic        inc;
  logic [31:0] count;
  logic [3:0]  count4;

  int checks = 0;
  int failures = 0;

  pulse_counter dut (.clk(clk), .reset(reset), .clear(clear), .en(en), .inc(inc), .count(count));
  pulse_counter #(.W(4)) dut4 (.clk(clk), .reset(reset), .clear(1'b0), .en(1'b1), .inc(inc), .count(count4));

  always #5 clk = ~clk;

  longint unsigned ref_count;
  int unsigned ref4;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    clear = 1'b0;
    en = 1'b0;
    inc = 1'b0;
    @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    ref_count = 0;
    ref4 = 0;
    for (int i = 0; i < 3000; i++) begin
      clear = ($urandom_range(0, 49) == 0);
      en    = ($urandom_range(0, 4) != 0);
      inc   = ($urandom_range(0, 1) == 0);
      @(posedge clk);
      if (clear) ref_count = 0;
      else if (en && inc) ref_count = ref_count + 1;
      if (inc) ref4 = (ref4 + 1) % 16;
      @(negedge clk);
      checks++;
      if (count !== ref_count[31:0]) begin
        failures++;
        $display("FAIL count=%0d expected %0d at %0t", count, ref_count, $time);
      end
      checks++;
      if (count4 !== ref4[3:0]) begin
        failures++;
        $display("FAIL count4=%0d expected %0d at %0t", count4, ref4, $time);
      end
    end
    // clear beats enable
    clear = 1'b1; en = 1'b1; inc = 1'b1;
    @(negedge clk);
    checks++;
    if (count !== 32'd0) begin
      failures++;
      $display("FAIL clear with enable: count=%0d", count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
