// n_real_updates: DSPstone "n_real_updates" kernel, d[i] = c[i] + a[i] *
// b[i] for i = 0..15, as a clock-gated FSMD with one loop.
//
// After the start handshake the machine stores a[i], b[i], c[i] and d[i] = 0
// at words 100+i, 200+i, 300+i, 400+i (two words per cycle, two cycles per
// index), raises profile and runs four states per element:
//   L1 read a[i], b[i]         L3 d = c + d
//   L2 read c[i]; d = a * b    L4 write d[i], i = i + 1
// profile is high for 16 * 4 = 64 cycles. Operand values (a[i] = (i+1)/4,
// b[i] = 2 - i/8, c[i] = i/16 - 1/2 in Q8.8) and the schedule are this
// design's choice. Data registers and the 5-bit index are clock gated by their
// write states (see cg_reg).
module n_real_updates
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
  typedef enum logic [3:0] {
    S_IDLE, S_WAIT, S_BUSY, S_INIT1, S_INIT2, S_PROF, L1, L2, L3, L4, S_END
  } state_e;

  state_e     state, state_nx;
  word_t      a, b, c, d;
  logic [4:0] i, i_nx;

  function automatic word_t a_val(input logic [4:0] k); return word_t'(64 * (int'(k) + 1)); endfunction
  function automatic word_t b_val(input logic [4:0] k); return word_t'(512 - 32 * int'(k)); endfunction
  function automatic word_t c_val(input logic [4:0] k); return word_t'(16 * int'(k) - 128); endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      S_IDLE:  state_nx = S_WAIT;
      S_WAIT:  if (start) state_nx = S_BUSY;
      S_BUSY:  state_nx = S_INIT1;
      S_INIT1: state_nx = S_INIT2;
      S_INIT2: state_nx = (i == 5'(N)) ? S_PROF : S_INIT1;
      S_PROF:  state_nx = L1;
      L1:      state_nx = L2;
      L2:      state_nx = L3;
      L3:      state_nx = L4;
      L4:      state_nx = (i == 5'(N)) ? S_END : L1;
      default: state_nx = S_IDLE;
    endcase
  end

  assign ready   = (state == S_IDLE) || (state == S_WAIT);
  assign profile = (state >= L1) && (state <= L4);

  always_comb begin
    mem1 = MEM_IDLE;
    mem2 = MEM_IDLE;
    fxu  = FXU_IDLE;
    unique case (state)
      S_INIT1: begin mem1 = mem_wr(32'd100 + 32'(i), a_val(i)); mem2 = mem_wr(32'd200 + 32'(i), b_val(i)); end
      S_INIT2: begin mem1 = mem_wr(32'd300 + 32'(i), c_val(i)); mem2 = mem_wr(32'd400 + 32'(i), '0); end
      L1: begin mem1 = mem_rd(32'd100 + 32'(i)); mem2 = mem_rd(32'd200 + 32'(i)); end
      L2: begin mem1 = mem_rd(32'd300 + 32'(i)); fxu = fxu_do(FXU_MUL, a, b); end
      L3: fxu  = fxu_do(FXU_ADD, c, d);
      L4: mem2 = mem_wr(32'd400 + 32'(i), d);
      default: ;
    endcase
  end

  assign i_nx = (state == S_BUSY || state == S_PROF) ? 5'd0 : i + 5'd1;

  cg_reg #(.W(5),  .XI(XI)) u_i (.clk, .rst_n, .we(state == S_BUSY || state == S_INIT2 || state == S_PROF || state == L4), .d(i_nx), .q(i));
  cg_reg #(.W(16), .XI(XI)) u_a (.clk, .rst_n, .we(state == L1), .d(mem_rdata1), .q(a));
  cg_reg #(.W(16), .XI(XI)) u_b (.clk, .rst_n, .we(state == L1), .d(mem_rdata2), .q(b));
  cg_reg #(.W(16), .XI(XI)) u_c (.clk, .rst_n, .we(state == L2), .d(mem_rdata1), .q(c));
  cg_reg #(.W(16), .XI(XI)) u_d (.clk, .rst_n, .we(state == L2 || state == L3), .d(fxu_result), .q(d));
endmodule
