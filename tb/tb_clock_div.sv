// tb_clock_div: checks the clock block against a cycle counter kept by the
// testbench. While run is low both divided outputs and ticks stay low.
// After run rises, in Active cycle i, fc1 must equal bit 2 of i and fc2
// bit 6 of i, fc1_tick must be high exactly when i mod 8 = 7 and fc2_tick
// exactly when i mod 128 = 127 (divide by 8 and 128). Dropping run must
// restart the phase from zero.
`timescale 1ns/1ps
module tb_clock_div;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic fc1, fc2, fc1_tick, fc2_tick;
  int   checks = 0, failures = 0;
  int   i;
  int   n_c1, n_c2;

  clock_div dut (.clk, .rst_n, .run, .fc1, .fc2, .fc1_tick, .fc2_tick);

  always #800 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (i=%0d)", what, i);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) begin
      @(negedge clk);
      check(!fc1 && !fc2 && !fc1_tick && !fc2_tick, "idle while run low");
    end
    for (int pass = 0; pass < 2; pass++) begin
      run = 1'b1;
      n_c1 = 0; n_c2 = 0;
      // Run for 3 fc2 periods on the first pass, part of one on the second.
      for (i = 0; i < (pass == 0 ? 384 : 100); i++) begin
        #1;
        check(fc1 == 1'((i >> 2) & 1), "fc1 level");
        check(fc2 == 1'((i >> 6) & 1), "fc2 level");
        check(fc1_tick == ((i % 8) == 7), "fc1_tick");
        check(fc2_tick == ((i % 128) == 127), "fc2_tick");
        n_c1 += int'(fc1_tick);
        n_c2 += int'(fc2_tick);
        @(negedge clk);
      end
      if (pass == 0) begin
        check(n_c1 == 48, "48 fc1 periods in 384 cycles");
        check(n_c2 == 3, "3 fc2 periods in 384 cycles");
      end
      run = 1'b0;
      @(posedge clk); #1;
      check(!fc1 && !fc2 && !fc1_tick && !fc2_tick, "cleared when run drops");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
