// tb_rom: programs the ROM with a test pattern and checks every word and
// column: the column lines must be the selected word and the data bit the
// selected column of it (word w+1, column c+1 = DATA bit 8*w + c). With no
// word selected all lines must be low.
`timescale 1ns/1ps
module tb_rom;
  localparam logic [63:0] PATTERN = 64'hC3A5_0F96_7E18_E14B;
  logic [7:0] word_sel, col_sel, col_lines;
  logic       data;
  int checks = 0, failures = 0;

  rom #(.N_WORDS(8), .N_COLS(8), .DATA(PATTERN)) dut (.word_sel, .col_sel, .col_lines, .data);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 8; w++) begin
      for (int c = 0; c < 8; c++) begin
        word_sel = 8'(1 << w);
        col_sel  = 8'(1 << c);
        #10;
        checks++;
        if (col_lines !== PATTERN[8*w +: 8]) begin
          failures++; $display("FAIL col_lines w=%0d got %h", w, col_lines);
        end
        checks++;
        if (data !== PATTERN[8*w + c]) begin
          failures++; $display("FAIL data w=%0d c=%0d", w, c);
        end
      end
    end
    word_sel = '0; col_sel = 8'h01; #10;
    checks++;
    if (col_lines !== '0 || data !== 1'b0) begin failures++; $display("FAIL no word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
