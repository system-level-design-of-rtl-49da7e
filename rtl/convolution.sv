// convolution: DSPstone "convolution" kernel, y = sum_{i=0}^{15} x[i] *
// h[15-i], as a clock-gated FSMD with one loop.
//
// After the start handshake the machine writes the 16 samples x[i] (words
// 100+i) and the 16 taps h[i] (words 200+i), one pair per cycle, raises
// profile and loops over the taps with index registers xi (counting up) and
// hi (counting down):
//   L1 read x[xi] and h[hi] into X and H
//   L2 temp1 = X * H
//   L3 Y = Y + temp1, xi = xi + 1, hi = hi - 1; leave after the 16th tap
// then writes Y to word 300. profile is high for 16 * 3 + 1 = 49 cycles. The
// sample values (x[i] = (i+1)/8, h[i] = 1 - 3i/32, in Q8.8), the result word
// and the 3-state loop are this design's choice. Every register, the 5-bit
// indices included, is wider than the gating threshold and is clocked only in
// the states that write it.
// Lint reports the state register as used both synchronously and
// asynchronously: it is ordinary data for the datapath and, through the
// clock-gate enables, also shapes the gated clocks. That is the clock-gating
// scheme itself, not a reset problem.
module convolution
  import codel_pkg::*;
#(
  parameter int unsigned XI = XI_DEFAULT,
  parameter int unsigned N  = 16          // number of taps
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
    S_IDLE, S_WAIT, S_BUSY, S_INIT, S_PROF, L1, L2, L3, S_WR, S_END
  } state_e;

  state_e     state, state_nx;
  word_t      xr, hr, y, y_nx, temp1;
  logic [4:0] xi, hi, xi_nx, hi_nx;

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
  end

  assign ready   = (state == S_IDLE) || (state == S_WAIT);
  assign profile = (state >= L1) && (state <= S_WR);

  always_comb begin
    mem1 = MEM_IDLE;
    mem2 = MEM_IDLE;
    fxu  = FXU_IDLE;
    unique case (state)
      S_INIT: begin mem1 = mem_wr(32'd100 + 32'(xi), x_val(xi)); mem2 = mem_wr(32'd200 + 32'(xi), h_val(xi)); end
      L1:     begin mem1 = mem_rd(32'd100 + 32'(xi)); mem2 = mem_rd(32'd200 + 32'(hi)); end
      L2:     fxu  = fxu_do(FXU_MUL, xr, hr);
      L3:     fxu  = fxu_do(FXU_ADD, y, temp1);
      S_WR:   mem1 = mem_wr(32'd300, y);
      default: ;
    endcase
  end

  always_comb begin
    xi_nx = (state == S_BUSY || state == S_PROF) ? 5'd0 : xi + 5'd1;
    hi_nx = (state == S_PROF) ? 5'(N - 1) : hi - 5'd1;
    y_nx  = (state == S_PROF) ? '0 : fxu_result;
  end

  cg_reg #(.W(5),  .XI(XI)) u_xi (.clk, .rst_n, .we(state == S_BUSY || state == S_INIT || state == S_PROF || state == L3), .d(xi_nx), .q(xi));
  cg_reg #(.W(5),  .XI(XI)) u_hi (.clk, .rst_n, .we(state == S_PROF || state == L3), .d(hi_nx), .q(hi));
  cg_reg #(.W(16), .XI(XI)) u_x  (.clk, .rst_n, .we(state == L1), .d(mem_rdata1), .q(xr));
  cg_reg #(.W(16), .XI(XI)) u_h  (.clk, .rst_n, .we(state == L1), .d(mem_rdata2), .q(hr));
  cg_reg #(.W(16), .XI(XI)) u_t  (.clk, .rst_n, .we(state == L2), .d(fxu_result), .q(temp1));
  cg_reg #(.W(16), .XI(XI)) u_y  (.clk, .rst_n, .we(state == S_PROF || state == L3), .d(y_nx), .q(y));
endmodule
