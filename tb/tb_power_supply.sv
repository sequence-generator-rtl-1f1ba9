// tb_power_supply: checks the mode control. The rail must come on at the
// clock edge after enable rises, stay on through tx_en pulses that are not
// at an fc2 boundary, go off at the edge where tx_en and fc2_tick are both
// high, stay off while enable is held high, come on again after enable
// falls and rises, and go off at once when enable falls while on.
`timescale 1ns/1ps
module tb_power_supply;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, tx_en = 1'b0, fc2_tick = 1'b0;
  logic rail;
  int checks = 0, failures = 0;

  power_supply dut (.clk, .rst_n, .enable, .tx_en, .fc2_tick, .rail);

  always #800 clk = ~clk;

  task automatic expect_rail(input logic v, input string what);
    checks++;
    if (rail !== v) begin failures++; $display("FAIL %s: rail=%0b", what, rail); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); expect_rail(0, "after reset");
    enable = 1'b1;
    #1 expect_rail(0, "not before the edge");
    @(negedge clk); expect_rail(1, "on after enable edge");
    fc2_tick = 1'b1;
    @(negedge clk); expect_rail(1, "fc2_tick alone");
    fc2_tick = 1'b0; tx_en = 1'b1;
    repeat (5) @(negedge clk);
    expect_rail(1, "tx_en without fc2_tick");
    fc2_tick = 1'b1;
    @(negedge clk); expect_rail(0, "off at end of transmission");
    fc2_tick = 1'b0; tx_en = 1'b0;
    repeat (20) @(negedge clk);
    expect_rail(0, "no restart while enable held");
    enable = 1'b0;
    @(negedge clk); expect_rail(0, "enable low");
    enable = 1'b1;
    @(negedge clk); expect_rail(1, "restart on new edge");
    repeat (3) @(negedge clk);
    enable = 1'b0;
    @(negedge clk); expect_rail(0, "abort when enable falls");
    enable = 1'b1;
    @(negedge clk); expect_rail(1, "on again");
    rst_n = 1'b0;
    #1 expect_rail(0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
