// cg_gate: the clock gate placed in front of every gated datapath register.
//
// The gated clock is gclk = (NOT clk) AND g. The gate signal g is decoded from
// the state register alone (the controller is a Moore machine), so it changes
// just after a rising clk edge, while NOT clk is low: gclk cannot glitch and
// needs no latch. A register clocked by gclk therefore loads on the falling
// clk edge in the middle of every state in which g is high, giving the state
// value half a cycle to settle before the write. The AND with inverted clock
// and the use of the falling edge follow the described gating circuit; the
// state register itself is never gated.
module cg_gate (
  input  logic clk,   // system clock
  input  logic g,     // gate enable, a function of the current state
  output logic gclk   // gated clock: pulses high during the low phase of clk
);
  assign gclk = ~clk & g;
endmodule
