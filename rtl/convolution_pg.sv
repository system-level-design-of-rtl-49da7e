// convolution_pg: the convolution kernel (y = sum of x[i] * h[15-i] over 16
// taps) with CoDeL-initiated power gating of its four 16-bit datapath
// registers X, H, temp1 and Y. It shows the lookahead on a machine with
// loops, where branch prediction matters.
//
// Schedule and memory map are those of convolution: states 0-1 wait for
// start, 2 clears the index, 3 stores the operands (loops on itself 16
// times), 4 clears Y and starts profiling, 5-7 are the tap loop (L1 read,
// L2 multiply, L3 accumulate; 7 branches back to 5 or on to 8), 8 writes Y
// to word 300. Each 16-bit register is a pg_reg with its own pg_lookahead
// table built from this state graph; the 5-bit index registers xi and hi
// stay clock gated only. A write to a register that is off or still waking
// stalls the whole FSMD (state, index registers and memory writes hold)
// until the register is awake.
//
// With backward prediction (the default) the self-loop of state 3 is
// predicted to continue, so no wake-up is started before the loop ends:
// Y is woken on demand in state 4 and X and H in state 5. Inside the tap
// loop the branch in state 7 is predicted to go back, and every register
// is written at least every three cycles, so nothing sleeps there. The
// registers sleep while the kernel waits for start. The stall cycles are
// visible on pg_stall and counted in the profile window when they fall in
// it. The lookahead rule, stall rule and parameter defaults are those of
// real_update_pg; applying them to this kernel is this design's choice.
// Lint reports the state register as used both synchronously and
// asynchronously: it is data for the datapath and, through the clock-gate
// enables, also shapes the gated clocks. That is the gating scheme itself.
module convolution_pg
  import codel_pkg::*;
#(
  parameter int unsigned XI       = XI_DEFAULT,
  parameter int unsigned N        = 16,          // number of taps
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
  output logic [3:0] pg_sleep,   // {Y, temp1, H, X} powered off
  output logic       pg_stall
);
  typedef enum logic [3:0] {
    S_IDLE, S_WAIT, S_BUSY, S_INIT, S_PROF, L1, L2, L3, S_WR, S_END
  } state_e;

  // State graph for the lookahead tables (index = state number): states 1
  // and 3 loop on themselves, state 7 goes back to 5 or on to 8.
  localparam logic [9:0][3:0] SUCC0 = {4'd0, 4'd9, 4'd5, 4'd7, 4'd6, 4'd5, 4'd4, 4'd3, 4'd2, 4'd1};
  localparam logic [9:0][3:0] SUCC1 = {4'd0, 4'd9, 4'd8, 4'd7, 4'd6, 4'd5, 4'd3, 4'd3, 4'd1, 4'd1};
  localparam logic [3:0][9:0] WR = {10'b00_1001_0000,   // Y: 4, 7
                                    10'b00_0100_0000,   // temp1: 6
                                    10'b00_0010_0000,   // H: 5
                                    10'b00_0010_0000};  // X: 5

  state_e     state, state_nx;
  word_t      xr, hr, y, temp1;
  logic [4:0] xi, hi, xi_nx, hi_nx;
  logic [3:0] we, stall, ssug, wsug;
  word_t      din [4];
  word_t      q [4];
  logic       hold;

  function automatic word_t x_val(input logic [4:0] i);
    return word_t'(32 * (int'(i) + 1));
  endfunction
  function automatic word_t h_val(input logic [4:0] i);
    return word_t'(256 - 24 * int'(i));
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      S_IDLE: state_nx = S_WAIT;
      S_WAIT: if (start) state_nx = S_BUSY;
      S_BUSY: state_nx = S_INIT;
      S_INIT: if (xi == 5'(N)) state_nx = S_PROF;
      S_PROF: state_nx = L1;
      L1:     state_nx = L2;
      L2:     state_nx = L3;
      L3:     state_nx = (xi == 5'(N)) ? S_WR : L1;
      S_WR:   state_nx = S_END;
      default: state_nx = S_IDLE;
    endcase
    if (hold) state_nx = state;
  end

  assign ready   = (state == S_IDLE) || (state == S_WAIT);
  assign profile = (state >= L1) && (state <= S_WR);

  always_comb begin
    mem1 = MEM_IDLE;
    mem2 = MEM_IDLE;
    unique case (state)
      S_INIT: begin mem1 = mem_wr(32'd100 + 32'(xi), x_val(xi)); mem2 = mem_wr(32'd200 + 32'(xi), h_val(xi)); end
      L1:     begin mem1 = mem_rd(32'd100 + 32'(xi)); mem2 = mem_rd(32'd200 + 32'(hi)); end
      S_WR:   mem1 = mem_wr(32'd300, y);
      default: ;
    endcase
    if (hold) begin
      mem1.wr = 1'b0;
      mem2.wr = 1'b0;
    end
  end

  always_comb begin
    fxu = FXU_IDLE;
    unique case (state)
      L2: fxu = fxu_do(FXU_MUL, xr, hr);
      L3: fxu = fxu_do(FXU_ADD, y, temp1);
      default: ;
    endcase
  end

  assign hold  = |stall;
  assign xi_nx = (state == S_BUSY || state == S_PROF) ? 5'd0 : xi + 5'd1;
  assign hi_nx = (state == S_PROF) ? 5'(N - 1) : hi - 5'd1;

  cg_reg #(.W(5), .XI(XI)) u_xi (.clk, .rst_n,
    .we(!hold && (state == S_BUSY || state == S_INIT || state == S_PROF || state == L3)), .d(xi_nx), .q(xi));
  cg_reg #(.W(5), .XI(XI)) u_hi (.clk, .rst_n, .we(!hold && (state == S_PROF || state == L3)), .d(hi_nx), .q(hi));

  assign we  = {state == S_PROF || state == L3, state == L2, state == L1, state == L1};
  assign din = '{mem_rdata1, mem_rdata2, fxu_result, (state == S_PROF) ? '0 : fxu_result};

  for (genvar r = 0; r < 4; r++) begin : g_reg
    pg_lookahead #(
      .N(10), .SW(4), .SUCC0(SUCC0), .SUCC1(SUCC1), .WRITES(WR[r]),
      .T_IDLE(T_IDLE), .T_WAKE(T_WAKE), .MODE(MODE), .WAKE_MODE(WAKE_MODE)
    ) u_la (.state(state), .sleep_sugg(ssug[r]), .wake_sugg(wsug[r]));

    pg_reg #(.W(16), .T_WAKEUP(T_WAKEUP)) u_reg (
      .clk, .rst_n, .we(we[r]), .hold, .sleep_sugg(ssug[r]), .wake_sugg(wsug[r]),
      .d(din[r]), .q(q[r]), .stall_o(stall[r]), .asleep_o(pg_sleep[r])
    );
  end

  assign xr    = q[0];
  assign hr    = q[1];
  assign temp1 = q[2];
  assign y     = q[3];
  assign pg_stall = hold;
endmodule
