// shift_register: one-hot ring of N stages that selects a ROM column or a
// ROM word.
//
// Before a transmission (en low) the ring is held with stage 1 set and all
// others clear, and the outputs show stage 1. This selects ROM word 1,
// whose column lines give the Delay block its delay code. When en (the
// Delay block's output) rises, the held one is already in the master half of
// stage 1, so the outputs show stage 2 at once: the first position used in
// a transmission is position 2. From then on the one moves by one stage at
// each input clock edge on which step is high, wrapping from stage N to
// stage 1, so exactly one output is high at any time. The column register
// steps every input cycle; the word register steps at fc1_tick, once per
// eight columns.
//
// Modelled here as a register q, loaded with stage 1 while en is low and
// rotated on step while en is high, and an output that is tied to stage 1
// while en is low and is q rotated by one while en is high. The stored ring always
// restarts from stage 1, like the original whose first stage stays powered
// through Passive mode.
module shift_register #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,  // power-on reset, active low
  input  logic         en,     // transmit enable from the Delay block
  input  logic         step,   // advance enable (1 for columns, fc1_tick for words)
  output logic [N-1:0] sel     // one-hot select, sel[0] = output 1
);

  localparam logic [N-1:0] FIRST = N'(1);

  logic [N-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= FIRST;
    else if (!en)  q <= FIRST;
    else if (step) q <= {q[N-2:0], q[N-1]};
  end

  assign sel = en ? {q[N-2:0], q[N-1]} : FIRST;

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(sel));

endmodule
