// cg_reg: a datapath register of the FSMD, clock gated when it is wide enough.
//
// A register whose width W is at least XI (the minimum gated word length,
// default 3, the value used for all evaluations) gets its own cg_gate: its
// clock only pulses in the states that write it, and it loads on that pulse
// (the falling clk edge). A narrower register is not worth a gate: it sees the
// falling clk edge every cycle and loads through an enable instead. In both
// cases q changes at the falling clk edge of a state in which we is high, so
// the two forms behave the same. rst_n clears the register asynchronously
// (reset behaviour is this design's choice).
module cg_reg #(
  parameter int unsigned W  = 16,
  parameter int unsigned XI = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,     // write-state decode (the gate signal g)
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (W >= XI) begin : g_gated
    logic gclk;
    cg_gate u_gate (.clk(clk), .g(we), .gclk(gclk));
    always_ff @(posedge gclk or negedge rst_n)
      if (!rst_n) q <= '0;
      else        q <= d;
  end else begin : g_plain
    always_ff @(negedge clk or negedge rst_n)
      if (!rst_n)  q <= '0;
      else if (we) q <= d;
  end
endmodule
