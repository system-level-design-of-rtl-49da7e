// lms: DSPstone "lms" kernel, one step of an N-tap adaptive FIR filter with
// the least-mean-squares update, as a clock-gated FSMD:
//   Y = sum h[i]*x[i];  x[i] = x[i-1] (delay line shift), x[0] = x0;
//   error = (d - Y) * delta;  h[i] = h[i] + error * x[i]
// with x[i] at words 100+i, h[i] at 200+i, d at 400, x0 at 500 and delta
// at 600.
//
// After the start handshake the machine stores x, h, d, x0 and delta,
// reads d, x0 and delta into registers, raises profile and runs:
//   A1 read x[i], h[i]; temp = x[i]*h[i]             (i = N-1 down to 0)
//   A2 Y = Y + temp; x[i] = x[i-1] (read over port 1, written over port 2
//      in the same cycle), or x[0] = x0 for i = 0
//   E1 temp = d - Y    E2 error = temp * delta
//   U1 read x[i], h[i]; temp = x[i]*error           (i = 0 up to N-1)
//   U2 h[i] = temp + h[i], written back
// The profile window is 4 N + 2 cycles (66 for N = 16). N = 16, the memory
// map and the order of the steps follow the documented kernel; the operand
// values (Q8.8) and the schedule are this design's choice. Data registers
// are clock gated by their write states.
// Lint reports the state register as used both synchronously and
// asynchronously: it is ordinary data for the datapath and, through the
// clock-gate enables, also shapes the gated clocks. That is the clock-gating
// scheme itself, not a reset problem.
module lms
  import codel_pkg::*;
#(
  parameter int unsigned XI         = XI_DEFAULT,
  parameter int unsigned N          = 16,
  parameter word_t       INIT_D     = 16'h0100,  // 1.0
  parameter word_t       INIT_X0    = 16'h0080,  // 0.5
  parameter word_t       INIT_DELTA = 16'h0020   // 0.125
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
    S_IDLE, S_WAIT, S_BUSY, S_INIT, S_INIT2, S_INIT3, S_GET1, S_GET2, S_PROF,
    A1, A2, E1, E2, U1, U2, S_END
  } state_e;

  state_e      state, state_nx;
  word_t       d, x0, delta, yacc, yacc_nx, temp1, error, hr;
  logic [4:0]  i, i_nx;
  logic [31:0] off;

  // x[i] = (i - 7)/8, h[i] = (16 - i)/16.
  function automatic word_t x_val(input logic [4:0] k);
    return word_t'(32 * (int'(k) - 7));
  endfunction
  function automatic word_t h_val(input logic [4:0] k);
    return word_t'(16 * (16 - int'(k)));
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;

  always_comb begin
    state_nx = state_e'(state + 5'd1);
    if (state == S_WAIT && !start)        state_nx = S_WAIT;
    if (state == S_INIT && i != 5'(N))     state_nx = S_INIT;
    if (state == A2 && i != 5'h1F)         state_nx = A1;
    if (state == U2 && i != 5'(N))         state_nx = U1;
    if (state == S_END)                    state_nx = S_IDLE;
  end

  assign ready   = (state == S_IDLE) || (state == S_WAIT);
  assign profile = (state >= A1) && (state <= U2);
  assign off     = 32'(i);

  always_comb begin
    mem1 = MEM_IDLE;
    mem2 = MEM_IDLE;
    fxu  = FXU_IDLE;
    unique case (state)
      S_INIT:  begin mem1 = mem_wr(32'd100 + off, x_val(i)); mem2 = mem_wr(32'd200 + off, h_val(i)); end
      S_INIT2: begin mem1 = mem_wr(32'd400, INIT_D); mem2 = mem_wr(32'd500, INIT_X0); end
      S_INIT3: mem1 = mem_wr(32'd600, INIT_DELTA);
      S_GET1:  begin mem1 = mem_rd(32'd400); mem2 = mem_rd(32'd500); end
      S_GET2:  mem1 = mem_rd(32'd600);
      A1: begin mem1 = mem_rd(32'd100 + off); mem2 = mem_rd(32'd200 + off); fxu = fxu_do(FXU_MUL, mem_rdata1, mem_rdata2); end
      A2: begin
        fxu = fxu_do(FXU_ADD, yacc, temp1);
        if (i != 5'd0) begin
          mem1 = mem_rd(32'd100 + off - 32'd1);
          mem2 = mem_wr(32'd100 + off, mem_rdata1);
        end else begin
          mem2 = mem_wr(32'd100, x0);
        end
      end
      E1: fxu = fxu_do(FXU_SUB, d, yacc);
      E2: fxu = fxu_do(FXU_MUL, temp1, delta);
      U1: begin mem1 = mem_rd(32'd100 + off); mem2 = mem_rd(32'd200 + off); fxu = fxu_do(FXU_MUL, mem_rdata1, error); end
      U2: begin fxu = fxu_do(FXU_ADD, temp1, hr); mem2 = mem_wr(32'd200 + off, fxu_result); end
      default: ;
    endcase
  end

  always_comb begin
    unique case (state)
      S_BUSY, E2: i_nx = 5'd0;
      S_PROF:     i_nx = 5'(N - 1);
      A2:         i_nx = i - 5'd1;
      default:    i_nx = i + 5'd1;
    endcase
    yacc_nx = (state == S_PROF) ? '0 : fxu_result;
  end

  cg_reg #(.W(5),  .XI(XI)) u_i  (.clk, .rst_n, .we(state inside {S_BUSY, S_INIT, S_PROF, A2, E2, U2}), .d(i_nx), .q(i));
  cg_reg #(.W(16), .XI(XI)) u_d  (.clk, .rst_n, .we(state == S_GET1), .d(mem_rdata1), .q(d));
  cg_reg #(.W(16), .XI(XI)) u_x0 (.clk, .rst_n, .we(state == S_GET1), .d(mem_rdata2), .q(x0));
  cg_reg #(.W(16), .XI(XI)) u_dl (.clk, .rst_n, .we(state == S_GET2), .d(mem_rdata1), .q(delta));
  cg_reg #(.W(16), .XI(XI)) u_y  (.clk, .rst_n, .we(state == S_PROF || state == A2), .d(yacc_nx), .q(yacc));
  cg_reg #(.W(16), .XI(XI)) u_t  (.clk, .rst_n, .we(state inside {A1, E1, U1}), .d(fxu_result), .q(temp1));
  cg_reg #(.W(16), .XI(XI)) u_e  (.clk, .rst_n, .we(state == E2), .d(fxu_result), .q(error));
  cg_reg #(.W(16), .XI(XI)) u_h  (.clk, .rst_n, .we(state == U1), .d(mem_rdata2), .q(hr));
endmodule
