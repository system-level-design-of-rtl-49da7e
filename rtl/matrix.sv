// matrix: DSPstone "matrix" kernel, the product C = A B of two 10x10
// matrices, as a clock-gated FSMD with three nested loops.
//
// After the start handshake the machine stores A row by row at words
// 100..199 and B row by row at 200..299 (one element of each per cycle),
// raises profile and computes every C[x][z] with ten 3-state
// multiply-accumulate steps
//   L1 read A[x][y] (word 100+ai) and B[y][z] (word 200+bi)
//   L2 temp1 = A * B
//   L3 C = C + temp1, y++, ai++, bi += 10
// followed by S_WR (write C[x][z] to word 300+ci, clear C, next column:
// ai back to the row start, bi = z+1) and, after the tenth column, S_ROW
// (next row: ai += 10, bi = 0). profile is high for 100 * 31 + 10 = 3110
// cycles. Element values (A[k] = ((7k mod 11) - 5)/16, B[k] = ((5k mod 13)
// - 6)/16 in Q8.8) and the schedule are this design's choice. The 7-bit
// address indices ai, bi, ci and the 4-bit loop counters x, y, z are clock
// gated like the data registers.
module matrix
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
  localparam int unsigned D = 10;   // matrix dimension
  typedef enum logic [3:0] {
    S_IDLE, S_WAIT, S_BUSY, S_INIT, S_PROF, L1, L2, L3, S_WR, S_ROW, S_END
  } state_e;

  state_e     state, state_nx;
  word_t      a, b, c, c_nx, temp1;
  logic [6:0] ai, bi, ci, ai_nx, bi_nx, ci_nx;
  logic [3:0] x, y, z, x_nx, y_nx, z_nx;

  function automatic word_t a_val(input logic [6:0] k); return word_t'(16 * ((7 * int'(k)) % 11 - 5)); endfunction
  function automatic word_t b_val(input logic [6:0] k); return word_t'(16 * ((5 * int'(k)) % 13 - 6)); endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      S_IDLE: state_nx = S_WAIT;
      S_WAIT: if (start) state_nx = S_BUSY;
      S_BUSY: state_nx = S_INIT;
      S_INIT: if (ai == 7'(D * D)) state_nx = S_PROF;
      S_PROF: state_nx = L1;
      L1:     state_nx = L2;
      L2:     state_nx = L3;
      L3:     state_nx = (y == 4'(D)) ? S_WR : L1;
      S_WR:   state_nx = (z == 4'(D)) ? S_ROW : L1;
      S_ROW:  state_nx = (x == 4'(D)) ? S_END : L1;
      default: state_nx = S_IDLE;
    endcase
  end

  assign ready   = (state == S_IDLE) || (state == S_WAIT);
  assign profile = (state >= L1) && (state <= S_ROW);

  always_comb begin
    mem1 = MEM_IDLE;
    mem2 = MEM_IDLE;
    fxu  = FXU_IDLE;
    unique case (state)
      S_INIT: begin mem1 = mem_wr(32'd100 + 32'(ai), a_val(ai)); mem2 = mem_wr(32'd200 + 32'(ai), b_val(ai)); end
      L1:     begin mem1 = mem_rd(32'd100 + 32'(ai)); mem2 = mem_rd(32'd200 + 32'(bi)); end
      L2:     fxu  = fxu_do(FXU_MUL, a, b);
      L3:     fxu  = fxu_do(FXU_ADD, c, temp1);
      S_WR:   mem2 = mem_wr(32'd300 + 32'(ci), c);
      default: ;
    endcase
  end

  // Loop counters and address indices, per state.
  always_comb begin
    ai_nx = ai; bi_nx = bi; ci_nx = ci; x_nx = x; y_nx = y; z_nx = z;
    c_nx  = '0;
    unique case (state)
      S_BUSY: ai_nx = '0;
      S_INIT: ai_nx = ai + 7'd1;
      S_PROF: begin ai_nx = '0; bi_nx = '0; ci_nx = '0; x_nx = '0; y_nx = '0; z_nx = '0; end
      L3:     begin c_nx = fxu_result; y_nx = y + 4'd1; ai_nx = ai + 7'd1; bi_nx = bi + 7'(D); end
      S_WR:   begin ci_nx = ci + 7'd1; y_nx = '0; z_nx = z + 4'd1; ai_nx = ai - 7'(D); bi_nx = 7'(z) + 7'd1; end
      S_ROW:  begin z_nx = '0; x_nx = x + 4'd1; ai_nx = ai + 7'(D); bi_nx = '0; end
      default: ;
    endcase
  end

  logic we_idx;
  assign we_idx = (state == S_BUSY) || (state == S_INIT) || (state == S_PROF) || (state == L3) ||
                  (state == S_WR) || (state == S_ROW);

  cg_reg #(.W(7),  .XI(XI)) u_ai (.clk, .rst_n, .we(we_idx), .d(ai_nx), .q(ai));
  cg_reg #(.W(7),  .XI(XI)) u_bi (.clk, .rst_n, .we(state == S_PROF || state == L3 || state == S_WR || state == S_ROW), .d(bi_nx), .q(bi));
  cg_reg #(.W(7),  .XI(XI)) u_ci (.clk, .rst_n, .we(state == S_PROF || state == S_WR), .d(ci_nx), .q(ci));
  cg_reg #(.W(4),  .XI(XI)) u_x  (.clk, .rst_n, .we(state == S_PROF || state == S_ROW), .d(x_nx), .q(x));
  cg_reg #(.W(4),  .XI(XI)) u_y  (.clk, .rst_n, .we(state == S_PROF || state == L3 || state == S_WR), .d(y_nx), .q(y));
  cg_reg #(.W(4),  .XI(XI)) u_z  (.clk, .rst_n, .we(state == S_PROF || state == S_WR || state == S_ROW), .d(z_nx), .q(z));
  cg_reg #(.W(16), .XI(XI)) u_a  (.clk, .rst_n, .we(state == L1), .d(mem_rdata1), .q(a));
  cg_reg #(.W(16), .XI(XI)) u_b  (.clk, .rst_n, .we(state == L1), .d(mem_rdata2), .q(b));
  cg_reg #(.W(16), .XI(XI)) u_t  (.clk, .rst_n, .we(state == L2), .d(fxu_result), .q(temp1));
  cg_reg #(.W(16), .XI(XI)) u_c  (.clk, .rst_n, .we(state == S_PROF || state == L3 || state == S_WR), .d(c_nx), .q(c));
endmodule
