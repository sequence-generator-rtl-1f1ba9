// tb_test_cells: drives the shared test clock with random D and T inputs.
// After each rising edge the D flip-flop output must be the D value before
// the edge and the T flip-flop output must have inverted exactly when T
// was high.
`timescale 1ns/1ps
module tb_test_cells;
  logic test_clk = 1'b0, test_d = 1'b0, test_t = 1'b0;
  logic test_dff_q, test_tff_q;
  logic d_before, t_before, q_before;
  int checks = 0, failures = 0;

  test_cells dut (.test_clk, .test_d, .test_t, .test_dff_q, .test_tff_q);

  always #10 test_clk = ~test_clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      @(negedge test_clk);
      test_d = 1'($urandom);
      test_t = 1'($urandom);
      d_before = test_d; t_before = test_t; q_before = test_tff_q;
      @(posedge test_clk);
      #3;
      checks++;
      if (test_dff_q !== d_before) begin failures++; $display("FAIL dff n=%0d", n); end
      checks++;
      if (test_tff_q !== (q_before ^ t_before)) begin failures++; $display("FAIL tff n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
