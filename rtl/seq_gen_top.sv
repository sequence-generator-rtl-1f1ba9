// seq_gen_top: RFID tag sequence generator.
//
// On a rising enable the chip leaves Passive mode, waits a delay set by ROM
// word 1 (in whole 204.8 us periods, 0 to 255 of them), then sends the
// 64 ROM bits twice, one bit per 625 kHz clock cycle, starting at word 2,
// column 2, while tx_en is high for those 128 cycles. At the end of the
// transmission it drops back to Passive mode; a new transmission needs a
// new rising edge of enable.
//
// Blocks: power_supply (mode/rail), clock_div (fc/8 and fc/128),
// delay_block (delay counter and comparator, output = tx_en), two
// shift_register rings (column, stepping every cycle; word, stepping at
// fc1) and the rom, whose selected bit is seq_out. test_cells holds the
// separate flip-flop test structures on their own pins. The output buffers
// of the chip are plain drivers and are not represented.
//
// Timing, in input clock cycles, counting the first Active cycle as 0:
// tx_en and seq_out are valid in cycles 128*v .. 128*v+127 for a delay
// code v; seq_out bit k (k = 0..127) is ROM word 2 + (k/8 mod 8), column
// 2 + (k mod 8), both wrapping from 8 to 1. The first Active cycle follows
// the clock edge that sees enable high after a low.
//
// All sequential logic runs on the one input clock with enables; an
// active-low power-on reset is added, as the real chip relies on power
// gating alone, and the switched rail is brought out as active, which has
// no pin on the real chip.
//
// The test T flip-flop is two latches in a ring with an XOR (see tff), so
// lint and synthesis report a loop through latches for it. The latches are
// never transparent together, so it is not a combinational loop in
// operation; it stands because the cells are built from latches as the
// test structures are meant to characterise.
module seq_gen_top
  import seq_gen_pkg::*;
#(
  parameter logic [N_WORDS*N_COLS-1:0] ROM_DATA = ROM_DEFAULT
) (
  input  logic clk,         // 625 kHz clock from the PLL
  input  logic rst_n,       // power-on reset, active low
  input  logic enable,      // Enable from the PLL
  output logic seq_out,     // digital sequence output
  output logic tx_en,       // transmit enable output
  output logic active,      // Active mode (switched rail on), for observation
  input  logic test_clk,    // test circuits clock
  input  logic test_d,      // test D flip-flop input
  input  logic test_t,      // test T flip-flop input
  output logic test_tff_q,  // test T flip-flop output
  output logic test_dff_q   // test D flip-flop output
);

  logic               rail;

  assign active = rail;
  logic               fc1_tick, fc2_tick;
  logic [N_COLS-1:0]  col_sel, col_lines;
  logic [N_WORDS-1:0] word_sel;

  power_supply u_power (
    .clk, .rst_n, .enable, .tx_en, .fc2_tick, .rail
  );

  clock_div #(.STAGES(DIV_STAGES), .FC1_STAGE(FC1_STAGE)) u_clock (
    .clk, .rst_n, .run(rail), .fc1(), .fc2(), .fc1_tick, .fc2_tick
  );

  delay_block #(.W(DELAY_W)) u_delay (
    .clk, .rst_n, .run(rail), .fc2_tick, .col_lines, .tx_en
  );

  shift_register #(.N(N_COLS)) u_col_sr (
    .clk, .rst_n, .en(tx_en), .step(1'b1), .sel(col_sel)
  );

  shift_register #(.N(N_WORDS)) u_word_sr (
    .clk, .rst_n, .en(tx_en), .step(fc1_tick), .sel(word_sel)
  );

  rom #(.N_WORDS(N_WORDS), .N_COLS(N_COLS), .DATA(ROM_DATA)) u_rom (
    .word_sel, .col_sel, .col_lines, .data(seq_out)
  );

  test_cells u_test (
    .test_clk, .test_d, .test_t, .test_dff_q, .test_tff_q
  );

endmodule
