// dff: positive-edge master-slave D flip-flop made of two dlatch cells.
// The master is transparent while clk is low, the slave while clk is high,
// so q takes d at each rising clock edge and holds it for the rest of the
// period. q and qn come from the same slave latch and change together.
module dff (
  input  logic clk,
  input  logic d,
  output logic q,
  output logic qn
);

  logic m_q, m_qn;

  dlatch u_master (.en(~clk), .d(d),   .q(m_q), .qn(m_qn));
  dlatch u_slave  (.en(clk),  .d(m_q), .q(q),   .qn(qn));

endmodule
