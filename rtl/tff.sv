// tff: T flip-flop built on dff. At each rising clock edge q inverts when
// t is high and holds when t is low (d = q xor t). There is no reset:
// the state after power-up is unknown until it is set by use, as in the
// original, where the enclosing blocks provide initialisation.
// The feedback from q through the XOR into the master-slave pair is a
// loop through two latches, which lint and synthesis report as a logic
// loop. The two latches are transparent on opposite clock levels, so the
// loop is never open end to end; it stands as the structure of the cell.
module tff (
  input  logic clk,
  input  logic t,
  output logic q,
  output logic qn
);

  dff u_dff (.clk(clk), .d(q ^ t), .q(q), .qn(qn));

endmodule
