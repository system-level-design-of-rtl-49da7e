// dot_product: DSPstone "dot_product" kernel, c = a1*b1 + a2*b2, as a
// clock-gated FSMD.
//
// After the start handshake (ready high in IDLE/WAIT) the machine stores the
// two 2-element vectors in memory (a1, a2 at words 100, 150; b1, b2 at 200,
// 250), raises profile and runs five kernel states:
//   K1 read a1 (port 1) and a2 (port 2)
//   K2 read b1 and b2, and multiply a1 by b1 straight from the memory port
//      into temp1
//   K3 c = a2 * b2
//   K4 c = c + temp1
//   K5 write c to word 300
// profile is high for these 5 cycles. The vector values (Q8.8 parameters)
// and this schedule are this design's choice; the documented compiler output
// also takes 5 cycles. Each data register is clock gated by its write states
// (see cg_reg); memory and FXU requests are decoded from the state.
module dot_product
  import codel_pkg::*;
#(
  parameter int unsigned XI      = XI_DEFAULT,
  parameter word_t       INIT_A1 = 16'h0200,  // 2.0
  parameter word_t       INIT_B1 = 16'h0100,  // 1.0
  parameter word_t       INIT_A2 = 16'h0100,  // 1.0
  parameter word_t       INIT_B2 = 16'h0500   // 5.0
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
    S_IDLE, S_WAIT, S_BUSY, S_INIT1, S_INIT2, S_PROF, K1, K2, K3, K4, K5, S_END
  } state_e;

  state_e state, state_nx;
  word_t  a1, a2, b1, b2, c, temp1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;

  always_comb begin
    state_nx = state_e'(state + 4'd1);
    if (state == S_WAIT && !start) state_nx = S_WAIT;
    if (state == S_END)            state_nx = S_IDLE;
  end

  assign ready   = (state == S_IDLE) || (state == S_WAIT);
  assign profile = (state >= K1) && (state <= K5);

  always_comb begin
    mem1 = MEM_IDLE;
    mem2 = MEM_IDLE;
    fxu  = FXU_IDLE;
    unique case (state)
      S_INIT1: begin mem1 = mem_wr(32'd100, INIT_A1); mem2 = mem_wr(32'd200, INIT_B1); end
      S_INIT2: begin mem1 = mem_wr(32'd150, INIT_A2); mem2 = mem_wr(32'd250, INIT_B2); end
      K1: begin mem1 = mem_rd(32'd100); mem2 = mem_rd(32'd150); end
      K2: begin mem1 = mem_rd(32'd200); mem2 = mem_rd(32'd250); fxu = fxu_do(FXU_MUL, a1, mem_rdata1); end
      K3: fxu  = fxu_do(FXU_MUL, a2, b2);
      K4: fxu  = fxu_do(FXU_ADD, c, temp1);
      K5: mem1 = mem_wr(32'd300, c);
      default: ;
    endcase
  end

  cg_reg #(.W(16), .XI(XI)) u_a1 (.clk, .rst_n, .we(state == K1), .d(mem_rdata1), .q(a1));
  cg_reg #(.W(16), .XI(XI)) u_a2 (.clk, .rst_n, .we(state == K1), .d(mem_rdata2), .q(a2));
  cg_reg #(.W(16), .XI(XI)) u_b1 (.clk, .rst_n, .we(state == K2), .d(mem_rdata1), .q(b1));
  cg_reg #(.W(16), .XI(XI)) u_b2 (.clk, .rst_n, .we(state == K2), .d(mem_rdata2), .q(b2));
  cg_reg #(.W(16), .XI(XI)) u_t1 (.clk, .rst_n, .we(state == K2), .d(fxu_result), .q(temp1));
  cg_reg #(.W(16), .XI(XI)) u_c  (.clk, .rst_n, .we(state == K3 || state == K4), .d(fxu_result), .q(c));

  // b1 is kept as the kernel's operand register although the product is
  // formed from the memory port in the same state.
  logic unused;
  assign unused = ^b1;
endmodule
