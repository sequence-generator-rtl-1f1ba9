// test_cells: the stand-alone test structures of the chip. A D flip-flop
// and a T flip-flop, the two cells the original circuit is built from, share the
// test clock pin and each has its own input and output pin, so they can be
// characterised on silicon apart from the sequence generator. Both cells
// are built from latches (dlatch, dff, tff), so the T flip-flop shows up in
// lint and synthesis as a loop through latches; see tff.
module test_cells (
  input  logic test_clk,   // test circuits clock
  input  logic test_d,     // D input of the test D flip-flop
  input  logic test_t,     // T input of the test T flip-flop
  output logic test_dff_q, // test D flip-flop output
  output logic test_tff_q  // test T flip-flop output
);

  logic dff_qn, tff_qn;

  dff u_dff (.clk(test_clk), .d(test_d), .q(test_dff_q), .qn(dff_qn));
  tff u_tff (.clk(test_clk), .t(test_t), .q(test_tff_q), .qn(tff_qn));

endmodule
