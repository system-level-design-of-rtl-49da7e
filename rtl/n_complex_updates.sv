// n_complex_updates: DSPstone "n_complex_updates" kernel, d[i] = c[i] +
// a[i] * b[i] on N complex numbers, as a clock-gated FSMD.
//
// After the start handshake the machine stores, for i = 0..N-1, a[i], b[i],
// c[i] and d[i] = 0 (real parts at words 100+i, 200+i, 300+i, 400+i,
// imaginary parts at 150+i, 250+i, 350+i, 450+i), two words per cycle, then
// raises profile and runs, for each i, ten states on the single FXU:
//   K1  read ar, ai
//   K2  read br, bi; temp1 = ar*br (br straight from the memory port)
//   K3  read cr, ci; temp2 = ai*bi
//   K4  dr = cr + temp1          K5  dr = dr - temp2
//   K6  temp1 = ar*bi            K7  temp2 = ai*br
//   K8  di = ci + temp1          K9  di = di + temp2
//   K10 write dr and di to words 400+i and 450+i; i = i + 1
// The profile window is 10 N cycles (160 for N = 16). N and the memory map
// follow the documented kernel; the operand values (functions of i, Q8.8)
// and the schedule are this design's choice. Data registers are clock
// gated by their write states; the 5-bit index is too (see cg_reg).
module n_complex_updates
  import codel_pkg::*;
#(
  parameter int unsigned XI = XI_DEFAULT,
  parameter int unsigned N  = 16
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

  state_e      state, state_nx;
  word_t       ar, ai, br, bi, cr, ci, dr, di, temp1, temp2;
  logic [4:0]  i, i_nx;
  logic [31:0] off;

  // Operand values: ar = (i+1)/8, ai = 1 - i/16, br = 1/2 - i/32,
  // bi = i/16 - 1/4, cr = i/4, ci = -i/8.
  function automatic word_t val(input int unsigned sel, input logic [4:0] k);
    word_t v;
    unique case (sel)
      0: v = word_t'(32 * (int'(k) + 1));
      1: v = word_t'(256 - 16 * int'(k));
      2: v = word_t'(128 - 8 * int'(k));
      3: v = word_t'(16 * int'(k) - 64);
      4: v = word_t'(64 * int'(k));
      default: v = word_t'(-32 * int'(k));
    endcase
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;

  always_comb begin
    state_nx = state_e'(state + 5'd1);
    if (state == S_WAIT && !start)               state_nx = S_WAIT;
    if (state == S_INIT4 && i != 5'(N))          state_nx = S_INIT1;
    if (state == K10 && i != 5'(N))              state_nx = K1;
    if (state == S_END)                          state_nx = S_IDLE;
  end

  assign ready   = (state == S_IDLE) || (state == S_WAIT);
  assign profile = (state >= K1) && (state <= K10);
  assign off     = 32'(i);

  always_comb begin
    mem1 = MEM_IDLE;
    mem2 = MEM_IDLE;
    fxu  = FXU_IDLE;
    unique case (state)
      S_INIT1: begin mem1 = mem_wr(32'd100 + off, val(0, i)); mem2 = mem_wr(32'd200 + off, val(2, i)); end
      S_INIT2: begin mem1 = mem_wr(32'd300 + off, val(4, i)); mem2 = mem_wr(32'd400 + off, '0);        end
      S_INIT3: begin mem1 = mem_wr(32'd150 + off, val(1, i)); mem2 = mem_wr(32'd250 + off, val(3, i)); end
      S_INIT4: begin mem1 = mem_wr(32'd350 + off, val(5, i)); mem2 = mem_wr(32'd450 + off, '0);        end
      K1:  begin mem1 = mem_rd(32'd100 + off); mem2 = mem_rd(32'd150 + off); end
      K2:  begin mem1 = mem_rd(32'd200 + off); mem2 = mem_rd(32'd250 + off); fxu = fxu_do(FXU_MUL, ar, mem_rdata1); end
      K3:  begin mem1 = mem_rd(32'd300 + off); mem2 = mem_rd(32'd350 + off); fxu = fxu_do(FXU_MUL, ai, bi); end
      K4:  fxu = fxu_do(FXU_ADD, cr, temp1);
      K5:  fxu = fxu_do(FXU_SUB, dr, temp2);
      K6:  fxu = fxu_do(FXU_MUL, ar, bi);
      K7:  fxu = fxu_do(FXU_MUL, ai, br);
      K8:  fxu = fxu_do(FXU_ADD, ci, temp1);
      K9:  fxu = fxu_do(FXU_ADD, di, temp2);
      K10: begin mem1 = mem_wr(32'd400 + off, dr); mem2 = mem_wr(32'd450 + off, di); end
      default: ;
    endcase
  end

  // i counts the init passes and then the kernel passes.
  assign i_nx = (state == S_BUSY || state == S_PROF) ? 5'd0 : i + 5'd1;

  cg_reg #(.W(5),  .XI(XI)) u_i  (.clk, .rst_n, .we(state == S_BUSY || state == S_PROF || state == S_INIT4 || state == K10),
                                  .d(i_nx), .q(i));
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
