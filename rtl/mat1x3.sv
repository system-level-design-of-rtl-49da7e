// mat1x3: DSPstone "mat1x3" kernel, the product y = H x of a 3x3 matrix H
// and a 3-vector x, as a clock-gated FSMD with two nested loops.
//
// After the start handshake the machine stores H row by row at words
// 100..108, x at 200..202 and y = 0 at 300..302, raises profile and for each
// row runs three 3-state multiply-accumulate steps
//   L1 read h[hi], x[i]   L2 temp1 = h * x   L3 y = y + temp1, hi++, i++
// followed by one state that writes y[row] to word 300+row and clears y.
// profile is high for 3 * (3 * 3 + 1) = 30 cycles. Values (h[k] = (k-4)/8,
// x[k] = (k+1)/2 in Q8.8) and the schedule are this design's choice. The
// 4-bit and 3-bit index registers are clock gated like the data registers.
module mat1x3
  import codel_pkg::*;
#(
  parameter int unsigned XI = XI_DEFAULT
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
    S_IDLE, S_WAIT, S_BUSY, S_INIT_H, S_INIT_X, S_PROF, L1, L2, L3, S_WR, S_END
  } state_e;

  state_e     state, state_nx;
  word_t      h, x, y, y_nx, temp1;
  logic [3:0] hi, hi_nx, i, i_nx;
  logic [2:0] row, row_nx;

  function automatic word_t h_val(input logic [3:0] k); return word_t'(32 * (int'(k) - 4)); endfunction
  function automatic word_t x_val(input logic [2:0] k); return word_t'(128 * (int'(k) + 1)); endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      S_IDLE:   state_nx = S_WAIT;
      S_WAIT:   if (start) state_nx = S_BUSY;
      S_BUSY:   state_nx = S_INIT_H;
      S_INIT_H: if (hi == 4'd9) state_nx = S_INIT_X;
      S_INIT_X: if (row == 3'd3) state_nx = S_PROF;
      S_PROF:   state_nx = L1;
      L1:       state_nx = L2;
      L2:       state_nx = L3;
      L3:       state_nx = (i == 4'd3) ? S_WR : L1;
      S_WR:     state_nx = (row == 3'd3) ? S_END : L1;
      default:  state_nx = S_IDLE;
    endcase
  end

  assign ready   = (state == S_IDLE) || (state == S_WAIT);
  assign profile = (state >= L1) && (state <= S_WR);

  always_comb begin
    mem1 = MEM_IDLE;
    mem2 = MEM_IDLE;
    fxu  = FXU_IDLE;
    unique case (state)
      S_INIT_H: mem1 = mem_wr(32'd100 + 32'(hi), h_val(hi));
      S_INIT_X: begin mem1 = mem_wr(32'd200 + 32'(row), x_val(row)); mem2 = mem_wr(32'd300 + 32'(row), '0); end
      L1:       begin mem1 = mem_rd(32'd100 + 32'(hi)); mem2 = mem_rd(32'd200 + 32'(i)); end
      L2:       fxu  = fxu_do(FXU_MUL, h, x);
      L3:       fxu  = fxu_do(FXU_ADD, y, temp1);
      S_WR:     mem1 = mem_wr(32'd300 + 32'(row), y);
      default: ;
    endcase
  end

  // Index and accumulator updates.
  always_comb begin
    hi_nx  = (state == S_BUSY || state == S_PROF) ? 4'd0 : hi + 4'd1;
    i_nx   = (state == L3) ? i + 4'd1 : 4'd0;
    row_nx = (state == S_BUSY || state == S_PROF) ? 3'd0 : row + 3'd1;
    y_nx   = (state == L3) ? fxu_result : '0;
  end

  cg_reg #(.W(4),  .XI(XI)) u_hi  (.clk, .rst_n, .we(state == S_BUSY || state == S_INIT_H || state == S_PROF || state == L3), .d(hi_nx), .q(hi));
  cg_reg #(.W(4),  .XI(XI)) u_i   (.clk, .rst_n, .we(state == S_PROF || state == L3 || state == S_WR), .d(i_nx), .q(i));
  cg_reg #(.W(3),  .XI(XI)) u_row (.clk, .rst_n, .we(state == S_BUSY || state == S_INIT_X || state == S_PROF || state == S_WR), .d(row_nx), .q(row));
  cg_reg #(.W(16), .XI(XI)) u_h   (.clk, .rst_n, .we(state == L1), .d(mem_rdata1), .q(h));
  cg_reg #(.W(16), .XI(XI)) u_x   (.clk, .rst_n, .we(state == L1), .d(mem_rdata2), .q(x));
  cg_reg #(.W(16), .XI(XI)) u_t   (.clk, .rst_n, .we(state == L2), .d(fxu_result), .q(temp1));
  cg_reg #(.W(16), .XI(XI)) u_y   (.clk, .rst_n, .we(state == S_PROF || state == L3 || state == S_WR), .d(y_nx), .q(y));
endmodule
