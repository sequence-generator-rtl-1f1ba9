// tb_shift_register: checks the one-hot ring against a position counter.
// With en low the output must be stage 1. With en high the output is the
// stage after the counted position, and the position advances on each
// clock edge with step high. Runs both a step-every-cycle pattern (column
// register) and a step-every-eighth-cycle pattern (word register), plus
// random en/step, and checks that en low returns the ring to stage 1.
`timescale 1ns/1ps
module tb_shift_register;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, step = 1'b0;
  logic [N-1:0] sel;
  int checks = 0, failures = 0;
  int pos;   // model: index of the stored one
  int cyc;

  shift_register #(.N(N)) dut (.clk, .rst_n, .en, .step, .sel);

  always #800 clk = ~clk;

  task automatic check_sel();
    logic [N-1:0] exp;
    exp = '0;
    exp[en ? (pos + 1) % N : 0] = 1'b1;
    checks++;
    if (sel !== exp) begin
      failures++;
      $display("FAIL cyc=%0d en=%0b pos=%0d sel=%b exp=%b", cyc, en, pos, sel, exp);
    end
  endtask

  // Model update on each rising edge.
  always @(posedge clk) begin
    if (!rst_n || !en) pos <= 0;
    else if (step)     pos <= (pos + 1) % N;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pos = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Held at stage 1.
    for (cyc = 0; cyc < 4; cyc++) begin @(negedge clk); check_sel(); end
    // Column pattern: step every cycle; first selected stage is 2.
    en = 1'b1; step = 1'b1;
    #1;
    checks++;
    if (sel !== 8'b0000_0010) begin failures++; $display("FAIL first stage not 2"); end
    for (cyc = 0; cyc < 24; cyc++) begin @(negedge clk); check_sel(); end
    en = 1'b0; step = 1'b0;
    @(negedge clk); check_sel();
    // Word pattern: step on the last cycle of each group of 8.
    en = 1'b1;
    for (cyc = 0; cyc < 128; cyc++) begin
      step = ((cyc % 8) == 7);
      #1 check_sel();
      @(negedge clk);
    end
    // Random.
    for (cyc = 0; cyc < 2000; cyc++) begin
      en   = ($urandom % 10) != 0;
      step = 1'($urandom);
      #1 check_sel();
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
