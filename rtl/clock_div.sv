// clock_div: the clock block. Divides the 625 kHz input clock by 8 (fc1,
// 78.125 kHz) and by 128 (fc2, 4.88281 kHz).
//
// The divider is a chain of STAGES divide-by-two stages counting input
// clock edges; fc1 is the output of stage FC1_STAGE and fc2 the output of
// the last stage, as in the original ripple divider of toggle flip-flops.
// Here the stages form one synchronous counter in the input clock domain,
// and instead of clocking other blocks with fc1/fc2 the block also gives
// one-cycle enables, fc1_tick and fc2_tick, high in the last input cycle of
// each fc1 and fc2 period. The blocks that the original clocks with fc1/fc2
// step on these enables.
//
// While run (the switched supply rail) is low the stages are held at zero,
// like the original's pull-down of every stage when the rail is off, so
// every active period starts from a known divider phase: the first fc1_tick
// comes in the 8th input cycle after run rises, the first fc2_tick in the
// 128th.
module clock_div #(
  parameter int unsigned STAGES    = seq_gen_pkg::DIV_STAGES,
  parameter int unsigned FC1_STAGE = seq_gen_pkg::FC1_STAGE
) (
  input  logic clk,       // fc, 625 kHz
  input  logic rst_n,     // power-on reset, active low
  input  logic run,       // supply rail: high in Active mode
  output logic fc1,       // fc / 2**FC1_STAGE square wave
  output logic fc2,       // fc / 2**STAGES square wave
  output logic fc1_tick,  // last input cycle of an fc1 period
  output logic fc2_tick   // last input cycle of an fc2 period
);

  logic [STAGES-1:0] stage_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    stage_q <= '0;
    else if (!run) stage_q <= '0;
    else           stage_q <= stage_q + 1'b1;
  end

  assign fc1      = stage_q[FC1_STAGE-1];
  assign fc2      = stage_q[STAGES-1];
  assign fc1_tick = run && (&stage_q[FC1_STAGE-1:0]);
  assign fc2_tick = run && (&stage_q);

endmodule
