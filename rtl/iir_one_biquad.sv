// iir_one_biquad: DSPstone "iir_one_biquad" kernel, one second-order IIR
// section in direct form II, as a clock-gated FSMD:
//   w = x - a1*w1 - a2*w2;  y = b0*w + b1*w1 + b2*w2;  w2 = w1;  w1 = w.
//
// After the start handshake the machine stores the input x (word 100), the
// state w1, w2 (200, 201) and the coefficients b0..b2 (300..302) and a1, a2
// (400, 401) in memory, reads them back into registers two words per cycle,
// raises profile and runs ten kernel states on the single FXU:
//   K1 temp = a1*w1   K2 w = x - temp   K3 temp = a2*w2   K4 w = w - temp
//   K5 y = b0*w       K6 temp = b1*w1   K7 y = y + temp   K8 temp = b2*w2
//   K9 y = y + temp, y stored to word 500, w2 = w1, w1 = w
//   K10 new w1 and w2 stored to words 200 and 201
// profile is high for these 10 cycles. The operation sequence and the
// memory map follow the documented kernel; storing y and the new state
// (so the result can be observed), the operand values (Q8.8 parameters) and
// the schedule are this design's choice. Data registers are clock gated by
// their write states (see cg_reg).
module iir_one_biquad
  import codel_pkg::*;
#(
  parameter int unsigned XI      = XI_DEFAULT,
  parameter word_t       INIT_X  = 16'h0100,  //  1.0
  parameter word_t       INIT_W1 = 16'h0080,  //  0.5
  parameter word_t       INIT_W2 = 16'h0040,  //  0.25
  parameter word_t       INIT_B0 = 16'h0080,  //  0.5
  parameter word_t       INIT_B1 = 16'h0040,  //  0.25
  parameter word_t       INIT_B2 = 16'h0020,  //  0.125
  parameter word_t       INIT_A1 = 16'hFF80,  // -0.5
  parameter word_t       INIT_A2 = 16'h0040   //  0.25
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
    S_IDLE, S_WAIT, S_BUSY, S_INIT1, S_INIT2, S_INIT3, S_INIT4,
    S_GET1, S_GET2, S_GET3, S_GET4, S_PROF,
    K1, K2, K3, K4, K5, K6, K7, K8, K9, K10, S_END
  } state_e;

  state_e state, state_nx;
  word_t  x, w1, w2, b0, b1, b2, a1, a2, y, w, temp1;

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
      S_INIT1: begin mem1 = mem_wr(32'd100, INIT_X);  mem2 = mem_wr(32'd200, INIT_W1); end
      S_INIT2: begin mem1 = mem_wr(32'd201, INIT_W2); mem2 = mem_wr(32'd300, INIT_B0); end
      S_INIT3: begin mem1 = mem_wr(32'd301, INIT_B1); mem2 = mem_wr(32'd302, INIT_B2); end
      S_INIT4: begin mem1 = mem_wr(32'd400, INIT_A1); mem2 = mem_wr(32'd401, INIT_A2); end
      S_GET1:  begin mem1 = mem_rd(32'd100); mem2 = mem_rd(32'd200); end
      S_GET2:  begin mem1 = mem_rd(32'd201); mem2 = mem_rd(32'd300); end
      S_GET3:  begin mem1 = mem_rd(32'd301); mem2 = mem_rd(32'd302); end
      S_GET4:  begin mem1 = mem_rd(32'd400); mem2 = mem_rd(32'd401); end
      K1:  fxu = fxu_do(FXU_MUL, a1, w1);
      K2:  fxu = fxu_do(FXU_SUB, x, temp1);
      K3:  fxu = fxu_do(FXU_MUL, a2, w2);
      K4:  fxu = fxu_do(FXU_SUB, w, temp1);
      K5:  fxu = fxu_do(FXU_MUL, b0, w);
      K6:  fxu = fxu_do(FXU_MUL, b1, w1);
      K7:  fxu = fxu_do(FXU_ADD, y, temp1);
      K8:  fxu = fxu_do(FXU_MUL, b2, w2);
      K9:  begin fxu = fxu_do(FXU_ADD, y, temp1); mem1 = mem_wr(32'd500, fxu_result); end
      K10: begin mem1 = mem_wr(32'd200, w1); mem2 = mem_wr(32'd201, w2); end
      default: ;
    endcase
  end

  cg_reg #(.W(16), .XI(XI)) u_x  (.clk, .rst_n, .we(state == S_GET1), .d(mem_rdata1), .q(x));
  cg_reg #(.W(16), .XI(XI)) u_w1 (.clk, .rst_n, .we(state == S_GET1 || state == K9),
                                  .d(state == K9 ? w : mem_rdata2), .q(w1));
  cg_reg #(.W(16), .XI(XI)) u_w2 (.clk, .rst_n, .we(state == S_GET2 || state == K9),
                                  .d(state == K9 ? w1 : mem_rdata1), .q(w2));
  cg_reg #(.W(16), .XI(XI)) u_b0 (.clk, .rst_n, .we(state == S_GET2), .d(mem_rdata2), .q(b0));
  cg_reg #(.W(16), .XI(XI)) u_b1 (.clk, .rst_n, .we(state == S_GET3), .d(mem_rdata1), .q(b1));
  cg_reg #(.W(16), .XI(XI)) u_b2 (.clk, .rst_n, .we(state == S_GET3), .d(mem_rdata2), .q(b2));
  cg_reg #(.W(16), .XI(XI)) u_a1 (.clk, .rst_n, .we(state == S_GET4), .d(mem_rdata1), .q(a1));
  cg_reg #(.W(16), .XI(XI)) u_a2 (.clk, .rst_n, .we(state == S_GET4), .d(mem_rdata2), .q(a2));
  cg_reg #(.W(16), .XI(XI)) u_t  (.clk, .rst_n, .we(state == K1 || state == K3 || state == K6 || state == K8),
                                  .d(fxu_result), .q(temp1));
  cg_reg #(.W(16), .XI(XI)) u_w  (.clk, .rst_n, .we(state == K2 || state == K4), .d(fxu_result), .q(w));
  cg_reg #(.W(16), .XI(XI)) u_y  (.clk, .rst_n, .we(state == K5 || state == K7 || state == K9), .d(fxu_result), .q(y));
endmodule
