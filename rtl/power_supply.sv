// power_supply: Passive/Active mode control, including the StartFinish
// toggle.
//
// This part stays alive in Passive mode. A rising edge of enable (seen as
// enable high in a cycle after it was low) switches the rail on: the mode
// becomes ACTIVE at that clock edge. The rail goes off again at the end of
// the transmission, which the original detects by sampling the Delay
// block's output with an fc2-derived clock; here the rail goes off at the
// input clock edge that ends the fc2 period in which tx_en was high
// (tx_en && fc2_tick). A held-high enable does not restart the generator:
// enable must fall and rise again, as the StartFinish toggle only flips on
// a rising start. If enable falls while ACTIVE, the rail goes off at the
// next edge (the original then forces the StartFinish output to its idle
// level), abandoning the cycle.
//
// The switch transistor itself is not modelled: rail is a logic level, and
// the blocks it feeds hold their registers at their reset values while it
// is low.
module power_supply
  import seq_gen_pkg::*;
(
  input  logic clk,
  input  logic rst_n,     // power-on reset, active low
  input  logic enable,    // Enable from the PLL
  input  logic tx_en,     // Delay block output
  input  logic fc2_tick,  // last input cycle of an fc2 period
  output logic rail       // switched supply: high in Active mode
);

  mode_e mode_q;
  logic  enable_q;
  logic  start, finish;

  assign start  = enable && !enable_q;
  assign finish = tx_en && fc2_tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q   <= PASSIVE;
      enable_q <= 1'b0;
    end else begin
      enable_q <= enable;
      unique case (mode_q)
        PASSIVE: if (start)             mode_q <= ACTIVE;
        ACTIVE:  if (!enable || finish) mode_q <= PASSIVE;
        default:                        mode_q <= PASSIVE;
      endcase
    end
  end

  assign rail = (mode_q == ACTIVE);

endmodule
