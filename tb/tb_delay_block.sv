// tb_delay_block: drives the Delay block with a local fc2_tick every 128
// cycles and word-1 column lines carrying a delay code v. For each code the
// transmit enable must rise exactly 128*v cycles after run rises and stay
// high for exactly 128 cycles, even though the column lines change to
// random values during the transmission (the code must be held). Codes
// 0, 1, 2 (the chip's 409.6 us), 5 and 255 are run; 255 also checks the
// counter's full 8-bit range.
`timescale 1ns/1ps
module tb_delay_block;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, fc2_tick;
  logic [7:0] col_lines;
  logic tx_en;
  int checks = 0, failures = 0;
  int cyc;

  delay_block #(.W(8)) dut (.clk, .rst_n, .run, .fc2_tick, .col_lines, .tx_en);

  always #800 clk = ~clk;

  assign fc2_tick = run && ((cyc % 128) == 127);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_code(input int v);
    int rise, high;
    rise = -1; high = 0;
    col_lines = 8'(v);
    run = 1'b0; cyc = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (tx_en) begin failures++; $display("FAIL tx_en while run low"); end
    run = 1'b1;
    for (cyc = 0; cyc < 128 * (v + 2); cyc++) begin
      #1;
      if (tx_en) begin
        if (rise < 0) rise = cyc;
        high++;
        col_lines = 8'($urandom);   // other words pass during transmission
      end else begin
        col_lines = 8'(v);
      end
      @(negedge clk);
    end
    checks++;
    if (rise != 128 * v) begin
      failures++; $display("FAIL code %0d: rise at %0d, expected %0d", v, rise, 128 * v);
    end
    checks++;
    if (high != 128) begin
      failures++; $display("FAIL code %0d: high for %0d cycles", v, high);
    end
    run = 1'b0;
  endtask

  initial begin
    cyc = 0;
    col_lines = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_code(2);
    run_code(0);
    run_code(1);
    run_code(5);
    run_code(255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
