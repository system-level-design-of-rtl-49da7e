// pg_reg: one datapath register of a CoDeL FSMD with both clock gating and
// power gating: a pg_ctrl controller, the CoDeL clock gate and an MTCMOS
// register.
//
// we is the register's write request, decoded from the FSM state; hold is
// the FSMD-wide stall (the OR of the stall_o outputs of all its power-gated
// registers). The register is clocked by gclk = (NOT clk) AND g with
// g = we AND NOT hold, so like every CoDeL register it loads at the falling
// clock edge, and only in cycles where it is written and no register is
// waking up. sleep_sugg and wake_sugg come from pg_lookahead. A write
// requested while the register is off raises stall_o until pg_ctrl reports
// it awake, T_WAKEUP cycles later.
module pg_reg #(
  parameter int unsigned W        = 16,
  parameter int unsigned T_WAKEUP = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic         hold,
  input  logic         sleep_sugg,
  input  logic         wake_sugg,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         stall_o,
  output logic         asleep_o
);
  logic gclk, awake;

  pg_ctrl #(.T_WAKEUP(T_WAKEUP)) u_ctrl (
    .clk, .rst_n, .sleep_sugg, .wake_sugg, .wr_req(we),
    .sleep_o(asleep_o), .awake_o(awake), .stall_o
  );
  cg_gate u_gate (.clk, .g(we && !hold), .gclk);
  mtcmos_reg #(.W(W)) u_reg (.clk(gclk), .rst_n, .sleep(asleep_o), .d, .q);

  logic unused;
  assign unused = awake;
endmodule
