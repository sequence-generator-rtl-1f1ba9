// tb_dlatch: while en is high q must follow d (and qn its inverse); while
// en is low q must hold the value d had when en fell, whatever d does.
`timescale 1ns/1ps
module tb_dlatch;
  logic en = 1'b0, d = 1'b0, q, qn, held;
  int checks = 0, failures = 0;

  dlatch dut (.en, .d, .q, .qn);

  task automatic expect_q(input logic v, input string what);
    checks++;
    if (q !== v || qn !== ~v) begin failures++; $display("FAIL %s: q=%0b qn=%0b", what, q, qn); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      en = 1'b1;
      d = 1'($urandom); #5 expect_q(d, "transparent");
      d = ~d;           #5 expect_q(d, "transparent, follows");
      held = d;
      en = 1'b0;        #5;
      repeat (4) begin
        d = 1'($urandom); #5 expect_q(held, "opaque, holds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
