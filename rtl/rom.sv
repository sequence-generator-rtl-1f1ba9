// rom: the 8 x 8 mask ROM.
//
// One-hot word lines (from the word shift register) choose a word; its
// bits appear on the column lines, which also go straight to the Delay
// block (delay_code). One-hot column selects (from the column shift
// register) then gate one column line onto the output bus (data). Purely
// combinational: a new bit is available in the same cycle the selects
// change. DATA bit [N_COLS*w + c] is word w+1, column c+1 (see
// seq_gen_pkg).
module rom #(
  parameter int unsigned N_WORDS = seq_gen_pkg::N_WORDS,
  parameter int unsigned N_COLS  = seq_gen_pkg::N_COLS,
  parameter logic [N_WORDS*N_COLS-1:0] DATA = seq_gen_pkg::ROM_DEFAULT
) (
  input  logic [N_WORDS-1:0] word_sel,   // one-hot word lines
  input  logic [N_COLS-1:0]  col_sel,    // one-hot column selects
  output logic [N_COLS-1:0]  col_lines,  // selected word, to the Delay block
  output logic               data        // selected bit, to the output bus
);

  always_comb begin
    col_lines = '0;
    for (int unsigned w = 0; w < N_WORDS; w++)
      if (word_sel[w]) col_lines |= DATA[w*N_COLS +: N_COLS];
  end

  assign data = |(col_lines & col_sel);

endmodule
