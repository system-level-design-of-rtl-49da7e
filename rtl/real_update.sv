// real_update: DSPstone "real_update" kernel, d = c + a * b, as a clock-gated
// FSMD with 14 states.
//
// States 0-2 raise ready and wait for start; states 3-6 load the operands a,
// b, c and d into memory (words 100, 200, 300, 400); state 7 raises profile;
// states 8-12 are the kernel proper: 8 reads a and b over both memory ports,
// 9 reads c, 10 computes a*b into d on the FXU, 11 computes c+d into d, 12
// writes d to word 400; state 13 lowers profile and the machine returns to
// state 0. profile is high for exactly the 5 kernel cycles (states 8-12).
// This state plan is the documented one; the operand values (parameters, in
// Q8.8) are this design's choice.
//
// Clock gating: registers a and b are clocked only in state 8, c in state 9,
// d in states 10 and 11 (see cg_reg). The state register is clocked every
// cycle on the rising edge; datapath registers load on the falling edge.
// Memory and FXU requests are decoded from the state and the registers.
module real_update
  import codel_pkg::*;
#(
  parameter int unsigned XI     = XI_DEFAULT,
  parameter word_t       INIT_A = 16'h0A00,  // 10.0
  parameter word_t       INIT_B = 16'h0200,  //  2.0
  parameter word_t       INIT_C = 16'h0100   //  1.0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  output logic     ready,
  output logic     profile,
  output fxu_req_t fxu,
  input  word_t    fxu_result,
  output mem_req_t mem1,
  input  word_t    mem_rdata1,
  output mem_req_t mem2,
  input  word_t    mem_rdata2
);
  typedef enum logic [3:0] {
    S0, S1, S2, S3, S4, S5, S6, S7, S8, S9, S10, S11, S12, S13
  } state_e;

  state_e state, state_nx;
  word_t  a, b, c, d, d_nx;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S0;
    else        state <= state_nx;

  always_comb begin
    state_nx = state_e'(state + 4'd1);
    if (state == S1 && !start) state_nx = S1;
    if (state == S13)          state_nx = S0;
  end

  // Moore outputs.
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
  end

  cg_reg #(.W(16), .XI(XI)) u_a (.clk, .rst_n, .we(state == S8), .d(mem_rdata1), .q(a));
  cg_reg #(.W(16), .XI(XI)) u_b (.clk, .rst_n, .we(state == S8), .d(mem_rdata2), .q(b));
  cg_reg #(.W(16), .XI(XI)) u_c (.clk, .rst_n, .we(state == S9), .d(mem_rdata1), .q(c));
  cg_reg #(.W(16), .XI(XI)) u_d (.clk, .rst_n, .we(state == S10 || state == S11), .d(d_nx), .q(d));
endmodule
