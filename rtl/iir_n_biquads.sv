// iir_n_biquads: DSPstone "iir_n_biquads" kernel, a cascade of NS
// second-order IIR sections (direct form II), as a clock-gated FSMD. For
// section s with coefficients a1, a2, b0, b1, b2 (words 100+5s .. 104+5s)
// and state w1, w2 (words 200+2s, 201+2s):
//   w = y - a1*w1 - a2*w2;  y = b0*w + b1*w1 + b2*w2;  w2 = w1;  w1 = w
// where y enters as the input x (word 300) and leaves as the cascade output
// (stored to word 301).
//
// After the start handshake the machine stores the 5 NS coefficients, the
// 2 NS state words and x, reads x into y, raises profile and runs nine
// states per section on the single FXU:
//   B1 read a1, w1; temp = a1*w1     B2 read a2, w2; w = y - temp
//   B3 temp = a2*w2                  B4 w = w - temp; read b0
//   B5 y = b0*w; read b1             B6 temp = b1*w1; read b2
//   B7 y = y + temp                  B8 temp = b2*w2
//   B9 y = y + temp; store w1 = w, w2 = old w1; next section
// then one state storing y. The profile window is 9 NS + 1 cycles (37 for
// four sections). NS = 4, the coefficient order and the memory regions
// follow the documented kernel; the state layout (two words per section),
// storing y, the operand values (Q8.8) and the schedule are this design's
// choice. Data registers are clock gated by their write states.
module iir_n_biquads
  import codel_pkg::*;
#(
  parameter int unsigned XI     = XI_DEFAULT,
  parameter int unsigned NS     = 4,
  parameter word_t       INIT_X = 16'h0100   // 1.0
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
    S_IDLE, S_WAIT, S_BUSY, S_INITC, S_INITX, S_GETX, S_PROF,
    B1, B2, B3, B4, B5, B6, B7, B8, B9, S_WR, S_END
  } state_e;

  state_e      state, state_nx;
  word_t       coeff, wv1, wv2, w, y, y_nx, temp1;
  logic [4:0]  k;        // init counter
  logic [2:0]  s;        // section
  logic [31:0] cb, wb;   // coefficient and state base addresses of section s

  // Coefficient k (section k/5, position k%5: a1 a2 b0 b1 b2) and state word
  // j initial values.
  function automatic word_t coef_val(input logic [4:0] kk);
    int base;
    unique case (int'(kk) % 5)
      0: base = -64;   // a1 = -1/4
      1: base = 32;    // a2 =  1/8
      2: base = 128;   // b0 =  1/2
      3: base = 64;    // b1 =  1/4
      default: base = 32;  // b2 = 1/8
    endcase
    return word_t'(base + 8 * (int'(kk) / 5));
  endfunction
  function automatic word_t state_val(input logic [4:0] kk);
    return word_t'(16 * (int'(kk) + 1));
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;

  always_comb begin
    state_nx = state_e'(state + 5'd1);
    if (state == S_WAIT && !start)                 state_nx = S_WAIT;
    if (state == S_INITC && k != 5'(5 * NS))   state_nx = S_INITC;
    if (state == B9 && s != 3'(NS))            state_nx = B1;
    if (state == S_END)                            state_nx = S_IDLE;
  end

  assign ready   = (state == S_IDLE) || (state == S_WAIT);
  assign profile = (state >= B1) && (state <= S_WR);
  assign cb      = 32'd100 + 32'(s) * 32'd5;
  assign wb      = 32'd200 + 32'(s) * 32'd2;

  always_comb begin
    mem1 = MEM_IDLE;
    mem2 = MEM_IDLE;
    unique case (state)
      S_INITC: begin
        mem1 = mem_wr(32'd100 + 32'(k), coef_val(k));
        if (int'(k) < 2 * NS) mem2 = mem_wr(32'd200 + 32'(k), state_val(k));
      end
      S_INITX: mem1 = mem_wr(32'd300, INIT_X);
      S_GETX:  mem1 = mem_rd(32'd300);
      B1: begin mem1 = mem_rd(cb);         mem2 = mem_rd(wb); end
      B2: begin mem1 = mem_rd(cb + 32'd1); mem2 = mem_rd(wb + 32'd1); end
      B4: mem1 = mem_rd(cb + 32'd2);
      B5: mem1 = mem_rd(cb + 32'd3);
      B6: mem1 = mem_rd(cb + 32'd4);
      B9: begin mem1 = mem_wr(wb, w);        mem2 = mem_wr(wb + 32'd1, wv1); end
      S_WR: mem1 = mem_wr(32'd301, y);
      default: ;
    endcase
  end

  always_comb begin
    fxu = FXU_IDLE;
    unique case (state)
      B1: fxu = fxu_do(FXU_MUL, mem_rdata1, mem_rdata2);
      B2: fxu = fxu_do(FXU_SUB, y, temp1);
      B3: fxu = fxu_do(FXU_MUL, coeff, wv2);
      B4: fxu = fxu_do(FXU_SUB, w, temp1);
      B5: fxu = fxu_do(FXU_MUL, coeff, w);
      B6: fxu = fxu_do(FXU_MUL, coeff, wv1);
      B7: fxu = fxu_do(FXU_ADD, y, temp1);
      B8: fxu = fxu_do(FXU_MUL, coeff, wv2);
      B9: fxu = fxu_do(FXU_ADD, y, temp1);
      default: ;
    endcase
  end

  assign y_nx = (state == S_GETX) ? mem_rdata1 : fxu_result;

  cg_reg #(.W(5),  .XI(XI)) u_k  (.clk, .rst_n, .we(state == S_BUSY || state == S_INITC),
                                  .d(state == S_BUSY ? 5'd0 : k + 5'd1), .q(k));
  cg_reg #(.W(3),  .XI(XI)) u_s  (.clk, .rst_n, .we(state == S_PROF || state == B9),
                                  .d(state == S_PROF ? 3'd0 : s + 3'd1), .q(s));
  cg_reg #(.W(16), .XI(XI)) u_c  (.clk, .rst_n, .we(state inside {B1, B2, B4, B5, B6}), .d(mem_rdata1), .q(coeff));
  cg_reg #(.W(16), .XI(XI)) u_w1 (.clk, .rst_n, .we(state == B1), .d(mem_rdata2), .q(wv1));
  cg_reg #(.W(16), .XI(XI)) u_w2 (.clk, .rst_n, .we(state == B2), .d(mem_rdata2), .q(wv2));
  cg_reg #(.W(16), .XI(XI)) u_t  (.clk, .rst_n, .we(state inside {B1, B3, B6, B8}), .d(fxu_result), .q(temp1));
  cg_reg #(.W(16), .XI(XI)) u_w  (.clk, .rst_n, .we(state == B2 || state == B4), .d(fxu_result), .q(w));
  cg_reg #(.W(16), .XI(XI)) u_y  (.clk, .rst_n, .we(state inside {S_GETX, B5, B7, B9}), .d(y_nx), .q(y));
endmodule
