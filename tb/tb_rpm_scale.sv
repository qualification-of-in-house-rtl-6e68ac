// tb_rpm_scale: self-checking test of the count-to-RPM conversion.
//
// Expected values are computed in 64-bit arithmetic as
// floor((a + b) * 60 / 16), with the sum wrapped to 32 bits, and compared
// with the block. Checked: the worked example of 1..4 pulses per second
// (3, 7, 11, 15 RPM), every count up to 4096 in either input, and random
// large counts.
`timescale 1ns/1ps
module tb_rpm_scale;

  logic [31:0] a;
  logic [31:0] b;
  logic [31:0] y;

  int checks = 0;
  int failures = 0;

  rpm_scale dut (.count_a(a), .count_b(b), .data_out(y));

  function automatic longint unsigned expected(input longint unsigned x, input longint unsigned z);
    longint unsigned s;
    s = (x + z) & 64'hFFFF_FFFF;
    return ((s * 60) / 16) & 64'hFFFF_FFFF;
  endfunction

  task automatic apply(input logic [31:0] x, input logic [31:0] z);
    a = x;
    b = z;
    #1;
    checks++;
    if (y !== 32'(expected(x, z))) begin
      failures++;
      $display("FAIL a=%0d b=%0d got %0d expected %0d", x, z, y, expected(x, z));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1, 2, 3, 4 pulses in a one-second window
    apply(1, 0); checks++; if (y != 3)  failures++;
    apply(2, 0); checks++; if (y != 7)  failures++;
    apply(0, 3); checks++; if (y != 11) failures++;
    apply(0, 4); checks++; if (y != 15) failures++;
    apply(16, 0); checks++; if (y != 60) failures++;  // one revolution per second
    for (int i = 0; i <= 4096; i++) begin
      apply(32'(i), 0);
      apply(0, 32'(i));
    end
    for (int i = 0; i < 2000; i++) begin
      apply($urandom, 0);
      apply(0, $urandom);
      apply($urandom_range(0, 1_000_000), $urandom_range(0, 1_000_000));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
