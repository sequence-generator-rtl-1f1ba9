// delay_block: waits a programmed number of fc2 periods, then raises the
// transmit enable for exactly one fc2 period (128 bits, 204.8 us).
//
// An 8-bit counter starts at zero when the rail comes up and counts fc2
// periods (it steps at fc2_tick). While the output is low, a register
// follows the ROM column lines, which then carry word 1, the delay code;
// once the output is high the register holds, so the other words that pass
// the column lines during the transmission do not disturb the comparison.
// The output is high while the rail is on and counter and held code are
// equal; the original forms it with eight XOR gates into an eight-input
// NAND and an inverter. With a code of v the output is high from input
// cycle 128*v to 128*v+127 after the rail comes up (v = 0 starts at once);
// after that the counter has moved on and the output falls.
module delay_block #(
  parameter int unsigned W = seq_gen_pkg::DELAY_W
) (
  input  logic         clk,
  input  logic         rst_n,      // power-on reset, active low
  input  logic         run,        // supply rail: high in Active mode
  input  logic         fc2_tick,   // last input cycle of an fc2 period
  input  logic [W-1:0] col_lines,  // ROM column lines (word 1 while waiting)
  output logic         tx_en       // transmit enable
);

  logic [W-1:0] count_q;
  logic [W-1:0] code_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        count_q <= '0;
    else if (!run)     count_q <= '0;
    else if (fc2_tick) count_q <= count_q + 1'b1;
  end

  // Transparent while not transmitting, held while transmitting.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      code_q <= '0;
    else if (!tx_en) code_q <= col_lines;
  end

  assign tx_en = run && (count_q == code_q);

endmodule
