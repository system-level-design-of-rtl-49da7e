// mtcmos_reg: behavioural model of a power-gated (MTCMOS) register with a
// state-retention ("balloon") latch, ports D, CLK, SLEEP, Q.
//
// With SLEEP low it is an ordinary edge-triggered register: Q takes D at the
// rising edge of CLK. With SLEEP high the register's supply is cut: clock
// edges are ignored and Q keeps showing the value saved in the retention
// latch, so a sleeping register can still be read. The real cell is a
// process-specific circuit (high-threshold sleep transistor, low-threshold
// logic); this model reproduces only its logic behaviour and carries no
// timing or power information. rst_n clears it.
module mtcmos_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sleep,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      q <= '0;
    else if (!sleep) q <= d;
endmodule
