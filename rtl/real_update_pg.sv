// real_update_pg: the real_update kernel (d = c + a * b, 14-state schedule
// of real_update) with CoDeL-initiated power gating of its four datapath
// registers.
//
// Each register a, b, c, d is a pg_reg (MTCMOS register behind a CoDeL
// clock gate, with its own pg_ctrl) and has a pg_lookahead table built from
// this FSM's state graph: state 1 either waits (start low) or continues, all
// other states go to the next one, state 13 back to 0. A register is put to
// sleep once no write to it lies within the next T_IDLE states and woken
// when a write lies within the next T_WAKE states. If a write reaches a
// register that is still off or waking (a misprediction, or T_WAKE too
// small), the whole FSMD stalls: the state register holds and all writes,
// memory writes included, are suppressed until the register is awake.
// With the defaults (T_WAKEUP = 2, T_WAKE = 3, backward prediction) every
// register is woken in time and the kernel still takes 5 cycles; with
// T_WAKE = 0 every register is woken on demand and the kernel takes
// 5 + 3 * (T_WAKEUP + 1) cycles. pg_sleep shows which registers are off,
// pg_stall the stall. Same interface and timing as real_update otherwise.
// The per-register controllers, the stall rule and the parameter defaults
// follow the described scheme (T_WAKEUP 2 and T_IDLE 10 are evaluated
// values); the operand values are this design's choice.
module real_update_pg
  import codel_pkg::*;
#(
  parameter word_t       INIT_A   = 16'h0A00,
  parameter word_t       INIT_B   = 16'h0200,
  parameter word_t       INIT_C   = 16'h0100,
  parameter int unsigned T_WAKEUP = 2,
  parameter int unsigned T_IDLE   = 10,
  parameter int unsigned T_WAKE   = T_WAKEUP + 1,
  parameter int unsigned MODE     = 2,
  parameter int unsigned WAKE_MODE = MODE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       ready,
  output logic       profile,
  output fxu_req_t   fxu,
  input  word_t      fxu_result,
  output mem_req_t   mem1,
  input  word_t      mem_rdata1,
  output mem_req_t   mem2,
  input  word_t      mem_rdata2,
  output logic [3:0] pg_sleep,   // {d, c, b, a} powered off
  output logic       pg_stall
);
  typedef enum logic [3:0] {
    S0, S1, S2, S3, S4, S5, S6, S7, S8, S9, S10, S11, S12, S13
  } state_e;

  // State graph for the lookahead tables (index = state number).
  localparam logic [13:0][3:0] SUCC0 = {4'd0, 4'd13, 4'd12, 4'd11, 4'd10, 4'd9, 4'd8,
                                        4'd7, 4'd6, 4'd5, 4'd4, 4'd3, 4'd2, 4'd1};
  localparam logic [13:0][3:0] SUCC1 = {4'd0, 4'd13, 4'd12, 4'd11, 4'd10, 4'd9, 4'd8,
                                        4'd7, 4'd6, 4'd5, 4'd4, 4'd3, 4'd1, 4'd1};
  localparam logic [3:0][13:0] WR = {14'b00_1100_0000_0000,   // d: 10, 11
                                     14'b00_0010_0000_0000,   // c: 9
                                     14'b00_0001_0000_0000,   // b: 8
                                     14'b00_0001_0000_0000};  // a: 8

  state_e     state, state_nx;
  word_t      a, b, c, d, d_nx;
  logic [3:0] we, stall, ssug, wsug;
  word_t      din [4];
  word_t      q [4];
  logic       hold;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S0;
    else        state <= state_nx;

  always_comb begin
    state_nx = state_e'(state + 4'd1);
    if (state == S1 && !start) state_nx = S1;
    if (state == S13)          state_nx = S0;
    if (hold)                  state_nx = state;
  end

  assign ready   = (state == S0) || (state == S1);
  assign profile = (state >= S8) && (state <= S12);

  always_comb begin
    mem1 = MEM_IDLE;
    mem2 = MEM_IDLE;
    fxu  = FXU_IDLE;
    d_nx = fxu_result;
    unique case (state)
      S3:  mem1 = mem_wr(32'd100, INIT_A);
      S4:  mem2 = mem_wr(32'd200, INIT_B);
      S5:  mem1 = mem_wr(32'd300, INIT_C);
      S6:  mem2 = mem_wr(32'd400, '0);
      S8:  begin mem1 = mem_rd(32'd100); mem2 = mem_rd(32'd200); end
      S9:  mem1 = mem_rd(32'd300);
      S10: fxu  = fxu_do(FXU_MUL, a, b);
      S11: fxu  = fxu_do(FXU_ADD, c, d);
      S12: mem1 = mem_wr(32'd400, d);
      default: ;
    endcase
    if (hold) begin
      mem1.wr = 1'b0;
      mem2.wr = 1'b0;
    end
  end

  assign we  = {state == S10 || state == S11, state == S9, state == S8, state == S8};
  assign din = '{mem_rdata1, mem_rdata2, mem_rdata1, d_nx};
  assign hold = |stall;

  for (genvar r = 0; r < 4; r++) begin : g_reg
    pg_lookahead #(
      .N(14), .SW(4), .SUCC0(SUCC0), .SUCC1(SUCC1), .WRITES(WR[r]),
      .T_IDLE(T_IDLE), .T_WAKE(T_WAKE), .MODE(MODE), .WAKE_MODE(WAKE_MODE)
    ) u_la (.state(state), .sleep_sugg(ssug[r]), .wake_sugg(wsug[r]));

    pg_reg #(.W(16), .T_WAKEUP(T_WAKEUP)) u_reg (
      .clk, .rst_n, .we(we[r]), .hold, .sleep_sugg(ssug[r]), .wake_sugg(wsug[r]),
      .d(din[r]), .q(q[r]), .stall_o(stall[r]), .asleep_o(pg_sleep[r])
    );
  end

  assign a = q[0];
  assign b = q[1];
  assign c = q[2];
  assign d = q[3];
  assign pg_stall = hold;
endmodule
