// seq_gen_pkg: sizes, ROM contents and mode type shared by the sequence
// generator blocks.
//
// The ROM is 8 words by 8 columns. ROM_DATA bit [8*w + c] is word w+1,
// column c+1. Word 1 holds the delay code, read with column 1 as the least
// significant bit, so the code 01000000 (column 1 first) is the value 2:
// two 204.8 us periods, 409.6 us. The other words hold the identification
// data. A transmission starts at word 2, column 2; the 64-bit value listed
// for the chip (bits in transmit order) fills words 2 to 6, and words 7 and
// 8, for which no value is listed, are zero here. Override ROM_DATA on the
// top to program another tag.
package seq_gen_pkg;

  localparam int unsigned N_WORDS    = 8;  // ROM words (word shift register stages)
  localparam int unsigned N_COLS     = 8;  // ROM columns (column shift register stages)
  localparam int unsigned DELAY_W    = 8;  // delay counter / delay code width
  localparam int unsigned DIV_STAGES = 7;  // divide-by-2 stages in the clock block
  localparam int unsigned FC1_STAGE  = 3;  // stage giving fc1 = fc / 8

  localparam logic [N_WORDS*N_COLS-1:0] ROM_DEFAULT = 64'h0000_4db4_9455_2402;

  // Power mode: only the power supply, the enable sampling and the first
  // shift register stages stay alive in PASSIVE.
  typedef enum logic {
    PASSIVE = 1'b0,
    ACTIVE  = 1'b1
  } mode_e;

endpackage
