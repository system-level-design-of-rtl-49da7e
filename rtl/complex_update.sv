// complex_update: DSPstone "complex_update" kernel, d = c + a * b on complex
// numbers (dr = cr + ar*br - ai*bi, di = ci + ar*bi + ai*br), as a
// clock-gated FSMD.
//
// After the start handshake the machine stores a, b, c and d = 0 in memory
// (real parts at words 100, 200, 300, 400; imaginary parts at 150, 250, 350,
// 450) two words per cycle, raises profile and runs ten kernel states on the
// single FXU:
//   K1  read ar, ai
//   K2  read br, bi; temp1 = ar*br (br taken straight from the memory port)
//   K3  read cr, ci; temp2 = ai*bi
//   K4  dr = cr + temp1          K5  dr = dr - temp2
//   K6  temp1 = ar*bi            K7  temp2 = ai*br
//   K8  di = ci + temp1          K9  di = di + temp2
//   K10 write dr and di to words 400 and 450
// profile is high for these 10 cycles. Operand values (Q8.8
// parameters) and the schedule are this design's choice. Data registers are
// clock gated by their write states (see cg_reg).
module complex_update
  import codel_pkg::*;
#(
  parameter int unsigned XI      = XI_DEFAULT,
  parameter word_t       INIT_AR = 16'h0200,  // 2.0
  parameter word_t       INIT_AI = 16'h0100,  // 1.0
  parameter word_t       INIT_BR = 16'h0200,  // 2.0
  parameter word_t       INIT_BI = 16'h0500,  // 5.0
  parameter word_t       INIT_CR = 16'h0300,  // 3.0
  parameter word_t       INIT_CI = 16'h0400   // 4.0
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
  typedef enum logic [4:0] {
    S_IDLE, S_WAIT, S_BUSY, S_INIT1, S_INIT2, S_INIT3, S_INIT4, S_PROF,
    K1, K2, K3, K4, K5, K6, K7, K8, K9, K10, S_END
  } state_e;

  state_e state, state_nx;
  word_t  ar, ai, br, bi, cr, ci, dr, di, temp1, temp2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;

  always_comb begin
    state_nx = state_e'(state + 5'd1);
    if (state == S_WAIT && !start) state_nx = S_WAIT;
    if (state == S_END)            state_nx = S_IDLE;
  end

  assign ready   = (state == S_IDLE) || (state == S_WAIT);
  assign profile = (state >= K1) && (state <= K10);

  always_comb begin
    mem1 = MEM_IDLE;
    mem2 = MEM_IDLE;
    fxu  = FXU_IDLE;
    unique case (state)
      S_INIT1: begin mem1 = mem_wr(32'd100, INIT_AR); mem2 = mem_wr(32'd200, INIT_BR); end
      S_INIT2: begin mem1 = mem_wr(32'd300, INIT_CR); mem2 = mem_wr(32'd400, '0);      end
      S_INIT3: begin mem1 = mem_wr(32'd150, INIT_AI); mem2 = mem_wr(32'd250, INIT_BI); end
      S_INIT4: begin mem1 = mem_wr(32'd350, INIT_CI); mem2 = mem_wr(32'd450, '0);      end
      K1:  begin mem1 = mem_rd(32'd100); mem2 = mem_rd(32'd150); end
      K2:  begin mem1 = mem_rd(32'd200); mem2 = mem_rd(32'd250); fxu = fxu_do(FXU_MUL, ar, mem_rdata1); end
      K3:  begin mem1 = mem_rd(32'd300); mem2 = mem_rd(32'd350); fxu = fxu_do(FXU_MUL, ai, bi); end
      K4:  fxu = fxu_do(FXU_ADD, cr, temp1);
      K5:  fxu = fxu_do(FXU_SUB, dr, temp2);
      K6:  fxu = fxu_do(FXU_MUL, ar, bi);
      K7:  fxu = fxu_do(FXU_MUL, ai, br);
      K8:  fxu = fxu_do(FXU_ADD, ci, temp1);
      K9:  fxu = fxu_do(FXU_ADD, di, temp2);
      K10: begin mem1 = mem_wr(32'd400, dr); mem2 = mem_wr(32'd450, di); end
      default: ;
    endcase
  end

  cg_reg #(.W(16), .XI(XI)) u_ar (.clk, .rst_n, .we(state == K1), .d(mem_rdata1), .q(ar));
  cg_reg #(.W(16), .XI(XI)) u_ai (.clk, .rst_n, .we(state == K1), .d(mem_rdata2), .q(ai));
  cg_reg #(.W(16), .XI(XI)) u_br (.clk, .rst_n, .we(state == K2), .d(mem_rdata1), .q(br));
  cg_reg #(.W(16), .XI(XI)) u_bi (.clk, .rst_n, .we(state == K2), .d(mem_rdata2), .q(bi));
  cg_reg #(.W(16), .XI(XI)) u_cr (.clk, .rst_n, .we(state == K3), .d(mem_rdata1), .q(cr));
  cg_reg #(.W(16), .XI(XI)) u_ci (.clk, .rst_n, .we(state == K3), .d(mem_rdata2), .q(ci));
  cg_reg #(.W(16), .XI(XI)) u_t1 (.clk, .rst_n, .we(state == K2 || state == K6), .d(fxu_result), .q(temp1));
  cg_reg #(.W(16), .XI(XI)) u_t2 (.clk, .rst_n, .we(state == K3 || state == K7), .d(fxu_result), .q(temp2));
  cg_reg #(.W(16), .XI(XI)) u_dr (.clk, .rst_n, .we(state == K4 || state == K5), .d(fxu_result), .q(dr));
  cg_reg #(.W(16), .XI(XI)) u_di (.clk, .rst_n, .we(state == K8 || state == K9), .d(fxu_result), .q(di));
endmodule
