// tb_rpm: end-to-end self-checking test of the CET speedometer.
//
// The window is shortened to G = 100 clock cycles (CLK_HZ_P = 100 with a
// one-second window) so that many windows run quickly. Each window gets a
// pulse train of a randomly chosen density, from none up to one edge every
// two cycles (the fastest the input stage accepts). The test's own model
// works from the documented timing only: an input edge applied before
// clock edge j is counted in the window that holds cycle j + 2 and appears
// in data_out in cycle j + 3. From that it predicts data_out on every cycle
// (the running value) and, when window_done is high, the finished speed
// floor(pulses * 60 / 16) of the window just ended; window_done must occur
// every G cycles. It also checks the worked example of 4 pulses in a
// window giving 15 RPM, a reset in the middle of a window, and counts how
// often each mechanism happened: windows of count1 and of count2 ending,
// empty windows, edges at a window boundary, maximum pulse rate and
// mid-window reset. A mechanism that never happened counts as a failure.
`timescale 1ns/1ps
module tb_rpm;
  import rpm_pkg::*;

  localparam int unsigned G = 100;
  localparam int unsigned NWIN = 40;

  logic        clk = 1'b0;
  logic        reset;
  logic        data_in;
  logic [31:0] data_out;
  window_e     win;
  logic        window_done;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_done_a = 0, n_done_b = 0, n_empty = 0, n_boundary = 0;
  int n_maxrate = 0, n_midreset = 0, n_example = 0;

  rpm #(.CLK_HZ_P(G)) dut (
    .clk(clk), .reset(reset), .data_in(data_in),
    .data_out(data_out), .win(win), .window_done(window_done)
  );

  always #5 clk = ~clk;

  int win_count [0:NWIN+1];
  int land_q [$];   // cycles in which a pending edge appears in data_out
  int last_edge;

  function automatic int unsigned to_rpm(input int n);
    return (n * 60) / 16;
  endfunction

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run `ncyc` cycles from a reset released on the current falling edge.
  // density[k] is the chance, in percent, of the input changing in a cycle
  // of window k; 100 toggles every cycle. Windows listed in `fixed` get
  // exactly fixed_n[k] evenly spaced one-cycle pulses instead.
  task automatic run(input int ncyc, input int density [0:NWIN+1],
                     input int fixed_n [0:NWIN+1]);
    int j, k, e, prev_in;
    for (int i = 0; i <= NWIN + 1; i++) win_count[i] = 0;
    land_q.delete();
    last_edge = -100;
    for (j = 0; j < ncyc; j++) begin
      #1;
      // edges that reach data_out in this cycle
      while (land_q.size() > 0 && land_q[0] == j) begin
        e = land_q.pop_front() - 3;
        win_count[(e + 2) / G]++;
      end
      k = j / G;
      check(window_done, (j % G == 0) && j > 0, "window_done period");
      if (j % G == 0 && j > 0) begin
        check(data_out, to_rpm(win_count[k - 1]), "finished window speed");
        check(win, (k % 2 == 1) ? WIN_B : WIN_A, "window select");
        if (k % 2 == 1) n_done_a++; else n_done_b++;
        if (win_count[k - 1] == 0) n_empty++;
        if (win_count[k - 1] == 4 && data_out == 15) n_example++;
      end else begin
        check(data_out, to_rpm(win_count[k]), "running speed");
      end
      // input for this cycle
      prev_in = data_in;
      if (fixed_n[k] >= 0) begin
        data_in = (fixed_n[k] > 0) && ((j % G) % (G / (fixed_n[k] + 1)) == 1)
                  && ((j % G) / (G / (fixed_n[k] + 1)) < fixed_n[k] + 1)
                  && ((j % G) >= G / (fixed_n[k] + 1));
      end else if ($urandom_range(1, 100) <= density[k]) begin
        data_in = ~data_in;
      end
      if (!prev_in && data_in) begin
        land_q.push_back(j + 3);
        if ((j + 2) % G == G - 1 || (j + 2) % G == 0) n_boundary++;
        if (j - last_edge == 2) n_maxrate++;
        last_edge = j;
      end
      @(negedge clk);
    end
  endtask

  int dens [0:NWIN+1];
  int fixn [0:NWIN+1];

  initial begin
    reset = 1'b1;
    data_in = 1'b0;
    repeat (3) @(negedge clk);
    // Segment 1: worked example first, then random densities.
    for (int i = 0; i <= NWIN + 1; i++) begin
      case (i % 5)
        0: dens[i] = 0;
        1: dens[i] = 5;
        2: dens[i] = 30;
        3: dens[i] = 100;
        default: dens[i] = $urandom_range(1, 100);
      endcase
      fixn[i] = -1;
    end
    fixn[0] = 4;   // 4 pulses in one window -> 15 RPM
    fixn[1] = 16;  // one revolution -> 60 RPM
    reset = 1'b0;
    run(NWIN * G + 1, dens, fixn);
    // Segment 2: reset in the middle of a busy window, then run again.
    for (int i = 0; i < 37; i++) begin
      data_in = ~data_in;
      @(negedge clk);
    end
    reset = 1'b1;
    data_in = 1'b0;
    @(negedge clk);
    #1;
    check(data_out, 0, "data_out cleared by reset");
    check(win, WIN_A, "window A after reset");
    n_midreset++;
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i <= NWIN + 1; i++) begin
      dens[i] = $urandom_range(0, 100);
      fixn[i] = -1;
    end
    run(10 * G + 1, dens, fixn);

    check(n_done_a > 0, 1, "count1 windows completed");
    check(n_done_b > 0, 1, "count2 windows completed");
    check(n_empty > 0, 1, "empty (zero speed) windows");
    check(n_boundary > 0, 1, "edges at a window boundary");
    check(n_maxrate > 0, 1, "maximum pulse rate");
    check(n_midreset > 0, 1, "reset in mid-window");
    check(n_example > 0, 1, "4 pulses -> 15 RPM");
    $display("mechanisms: count1 windows %0d, count2 windows %0d, empty %0d, boundary edges %0d, max-rate edges %0d, mid-window resets %0d, 4-pulse example %0d",
             n_done_a, n_done_b, n_empty, n_boundary, n_maxrate, n_midreset, n_example);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
