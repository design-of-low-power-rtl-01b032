// clk_gate: glitch-free clock gate for idle power saving.
//
// The enable is re-sampled on the falling edge of the input clock and ANDed
// with the clock, so the gated clock can only start or stop while the input
// clock is low and never produces a shortened pulse. Placed between a phase
// interpolator and its clock tree, it stops the transmit clock tree while no
// command or data is being sent, while the DLL in front of it keeps running.
// Timing: an enable change seen at a falling edge shows at the next rising edge.
// The falling-edge re-sampling follows the source design.
module clk_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic gclk
);

  logic en_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= en;
  end

  assign gclk = clk & en_q;

endmodule
