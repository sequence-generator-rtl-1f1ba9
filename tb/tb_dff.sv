// tb_dff: q must take the value d had at each rising clock edge and keep
// it until the next one, whatever d does in between; qn is always ~q.
`timescale 1ns/1ps
module tb_dff;
  logic clk = 1'b0, d = 1'b0, q, qn, sampled;
  int checks = 0, failures = 0;

  dff dut (.clk, .d, .q, .qn);

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
      d = 1'($urandom);
      #5 d = 1'($urandom);   // the last value before the edge counts
      sampled = d;
      @(posedge clk);
      #2 d = ~d;             // changes after the edge must not pass
      #3;
      checks++;
      if (q !== sampled || qn !== ~sampled) begin
        failures++; $display("FAIL n=%0d q=%0b qn=%0b exp=%0b", n, q, qn, sampled);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
