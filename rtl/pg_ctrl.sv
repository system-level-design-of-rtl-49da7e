// pg_ctrl: power-gating controller for one register.
//
// Three states, updated on the rising clock edge together with the FSM
// state register: ON (supply on, register usable), OFF (sleep transistor
// open) and WAKING (supply being restored). ON goes to OFF when the
// compile-time hint sleep_sugg is high and the register is not being
// written. OFF goes to WAKING when the hint wake_sugg is high, or on demand
// when the FSM wants to write the register (wr_req). WAKING lasts T_WAKEUP
// cycles and ends in ON. awake_o is the AWAKE signal: high only in ON.
// stall_o = wr_req AND NOT awake_o: the FSMD must hold its state and
// suppress its writes until the register is awake, so a late wake-up costs
// cycles but never corrupts data. sleep_o drives the SLEEP input of the
// MTCMOS register (high in OFF). T_WAKEUP defaults to 2 cycles, the smallest
// wake-up time evaluated; T_WAKEUP = 0 wakes in the cycle after the request.
// Reset leaves the register on (this design's choice).
module pg_ctrl #(
  parameter int unsigned T_WAKEUP = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sleep_sugg,
  input  logic wake_sugg,
  input  logic wr_req,
  output logic sleep_o,
  output logic awake_o,
  output logic stall_o
);
  typedef enum logic [1:0] {PG_ON, PG_OFF, PG_WAKING} pg_state_e;
  localparam int unsigned CW = (T_WAKEUP > 1) ? $clog2(T_WAKEUP) : 1;
  localparam logic [CW-1:0] CNT_LOAD = (T_WAKEUP > 0) ? CW'(T_WAKEUP - 1) : '0;

  pg_state_e     st;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st  <= PG_ON;
      cnt <= '0;
    end else begin
      unique case (st)
        PG_ON:   if (sleep_sugg && !wr_req) st <= PG_OFF;
        PG_OFF:  if (wake_sugg || wr_req) begin
                   st  <= (T_WAKEUP == 0) ? PG_ON : PG_WAKING;
                   cnt <= CNT_LOAD;
                 end
        default: if (cnt == '0) st <= PG_ON;
                 else           cnt <= cnt - 1'b1;
      endcase
    end

  assign awake_o = (st == PG_ON);
  assign sleep_o = (st == PG_OFF);
  assign stall_o = wr_req && !awake_o;
endmodule
