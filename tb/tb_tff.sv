// tb_tff: at each rising edge q must invert when t was high and hold when
// t was low; qn is always ~q. The power-up state is unknown, so each check
// compares against the value q_prev the edge.
`timescale 1ns/1ps
module tb_tff;
  logic clk = 1'b0, t = 1'b0, q, qn, q_prev;
  int checks = 0, failures = 0, toggles = 0;

  tff dut (.clk, .t, .q, .qn);

  always #10 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      t = 1'($urandom);
      q_prev = q;
      @(posedge clk);
      #3;
      checks++;
      if (q !== (q_prev ^ t) || qn !== ~q) begin
        failures++; $display("FAIL n=%0d t=%0b q_prev=%0b q=%0b", n, t, q_prev, q);
      end
      toggles += int'(t);
    end
    checks++;
    if (toggles == 0) begin failures++; $display("FAIL never toggled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
