// fir: DSPstone "fir" kernel, a 16-tap FIR filter step with delay line, as a
// clock-gated FSMD with one loop.
//
// After the start handshake the machine stores the delay line x[i] (words
// 100+i) and the taps h[i] (words 200+i), raises profile and walks the taps
// from i = 15 down to 0:
//   L1 read x[i] and h[i] into X and H
//   L2 temp1 = X * H, and shift the delay line: x[i+1] = X (not for i = 15)
//   L3 Y = Y + temp1, i = i - 1; leave after i = 0
// then stores the new input sample NEW_X as x[0] and the output Y at word
// 300. profile is high for 16 * 3 + 1 = 49 cycles. Sample and tap values
// (x[i] = (16-i)/16, h[i] = (i+1)/32 - 1/4 in Q8.8), NEW_X, the result word
// and the schedule are this design's choice. The loop ends when the 5-bit
// index wraps from 0 to 31. Registers are clock gated by their write states.
// Lint reports the state register as used both synchronously and
// asynchronously: it is ordinary data for the datapath and, through the
// clock-gate enables, also shapes the gated clocks. That is the clock-gating
// scheme itself, not a reset problem.
module fir
  import codel_pkg::*;
#(
  parameter int unsigned XI    = XI_DEFAULT,
  parameter word_t       NEW_X = 16'h0100   // 1.0, the sample shifted in
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
  localparam int unsigned N = 16;
  typedef enum logic [3:0] {
    S_IDLE, S_WAIT, S_BUSY, S_INIT, S_PROF, L1, L2, L3, S_WR, S_END
  } state_e;

  state_e     state, state_nx;
  word_t      xr, hr, y, y_nx, temp1;
  logic [4:0] i, i_nx;

  function automatic word_t x_val(input logic [4:0] k); return word_t'(16 * (16 - int'(k))); endfunction
  function automatic word_t h_val(input logic [4:0] k); return word_t'(8 * (int'(k) + 1) - 64); endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      S_IDLE: state_nx = S_WAIT;
      S_WAIT: if (start) state_nx = S_BUSY;
      S_BUSY: state_nx = S_INIT;
      S_INIT: if (i == 5'(N)) state_nx = S_PROF;
      S_PROF: state_nx = L1;
      L1:     state_nx = L2;
      L2:     state_nx = L3;
      L3:     state_nx = (i == 5'd31) ? S_WR : L1;
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
      S_INIT: begin mem1 = mem_wr(32'd100 + 32'(i), x_val(i)); mem2 = mem_wr(32'd200 + 32'(i), h_val(i)); end
      L1:     begin mem1 = mem_rd(32'd100 + 32'(i)); mem2 = mem_rd(32'd200 + 32'(i)); end
      L2:     begin
                fxu = fxu_do(FXU_MUL, xr, hr);
                if (i != 5'(N - 1)) mem1 = mem_wr(32'd101 + 32'(i), xr);
              end
      L3:     fxu = fxu_do(FXU_ADD, y, temp1);
      S_WR:   begin mem1 = mem_wr(32'd100, NEW_X); mem2 = mem_wr(32'd300, y); end
      default: ;
    endcase
  end

  always_comb begin
    unique case (state)
      S_BUSY:  i_nx = 5'd0;
      S_INIT:  i_nx = i + 5'd1;
      S_PROF:  i_nx = 5'(N - 1);
      default: i_nx = i - 5'd1;
    endcase
    y_nx = (state == S_PROF) ? '0 : fxu_result;
  end

  cg_reg #(.W(5),  .XI(XI)) u_i (.clk, .rst_n, .we(state == S_BUSY || state == S_INIT || state == S_PROF || state == L3), .d(i_nx), .q(i));
  cg_reg #(.W(16), .XI(XI)) u_x (.clk, .rst_n, .we(state == L1), .d(mem_rdata1), .q(xr));
  cg_reg #(.W(16), .XI(XI)) u_h (.clk, .rst_n, .we(state == L1), .d(mem_rdata2), .q(hr));
  cg_reg #(.W(16), .XI(XI)) u_t (.clk, .rst_n, .we(state == L2), .d(fxu_result), .q(temp1));
  cg_reg #(.W(16), .XI(XI)) u_y (.clk, .rst_n, .we(state == S_PROF || state == L3), .d(y_nx), .q(y));
endmodule
