// tff_clock_gate: clock gate built from a T flip-flop and an AND gate.
//
// The T flip-flop's output Q is ANDed with the system clock to form the
// gated clock that drives the ALU. With EN (the T input) high, Q toggles
// every cycle, so the gated clock passes every other clock pulse: a
// half-frequency clock. With EN low, Q holds: if it holds at 1 every clock
// pulse passes, if it holds at 0 the gated clock stays low and the logic
// behind it does not switch. This T flip-flop plus AND structure is the
// published clock-gating scheme.
//
// Choices of this design: the flip-flop changes on the falling clock edge,
// so Q is settled while clk is high and the AND gate can neither clip nor
// glitch a pulse; Q resets to RESET_Q (1 by default, clock running) under an
// asynchronous active-low reset.
//
// Interface: clk, rst_n, en in; q (gating control) and gclk out.
// Timing: en is sampled on the falling edge of clk; the gated clock pulse
// that follows (clk high phase) is passed if the new Q is 1.
module tff_clock_gate #(
  parameter bit RESET_Q = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic q,
  output logic gclk
);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)  q <= RESET_Q;
    else if (en) q <= ~q;
  end

  assign gclk = clk & q;

endmodule
