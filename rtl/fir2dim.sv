// fir2dim: DSPstone "fir2dim" kernel, a 3x3 two-dimensional FIR filter
// over a 4x4 image, as a clock-gated FSMD:
//   out[y][x] = sum over r, c in 0..2 of coeff[3r+c] * array[y+r][x+c]
// where array is the image surrounded by a one-pixel border of zeros
// (6x6 words). Image at words 100..115, coefficients at 200..208, padded
// array at 300..335, output at 400..415.
//
// After the start handshake the machine stores the image and clears the
// output (two words per cycle), stores the coefficients, then builds the
// padded array: one word per cycle, a border word is written as 0, an
// inner word is read from the image over port 1 and written over port 2 in
// the same cycle. It then raises profile and, for each output pixel, runs
// for each of the nine taps
//   M  read coeff and array word; temp = coeff * array  (straight from the
//      memory ports)
//   A  acc = acc + temp
// and one state W storing acc. The profile window is 16 * 19 = 304 cycles.
// The sizes, the memory map and the padding follow the documented kernel;
// the operand values (Q8.8) and the schedule are this design's choice.
// Every register is clocked only in the states that write it; its clock
// enable depends on the state alone (a condition on another register, which
// changes at the same falling edge, could glitch the gated clock), so the
// carry of a nested loop counter goes into the data input instead. The
// 2-bit counters are narrower than XI and use a plain load enable.
// Lint reports the state register as used both synchronously and
// asynchronously: it is ordinary data for the datapath and, through the
// clock-gate enables, also shapes the gated clocks. That is the clock-gating
// scheme itself, not a reset problem.
module fir2dim
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
    S_IDLE, S_WAIT, S_BUSY, S_IMG, S_CF, S_ARR0, S_ARR, S_PROF, M, A, W, S_END
  } state_e;

  state_e      state, state_nx;
  word_t       temp1, acc, acc_nx;
  logic [4:0]  k;              // init counter
  logic [2:0]  pr, pc;         // padded array row / column
  logic [1:0]  ox, kr, kc;     // output column, tap
  logic [2:0]  oy;             // output row (reaches 4 when done)
  logic        border, taps_done, pix_done;
  logic [31:0] p_addr, img_addr, tap_addr;

  // image[k] = (k+1)/16, coeff[k] = (k-4)/8.
  function automatic word_t img_val(input logic [4:0] kk);
    return word_t'(16 * (int'(kk) + 1));
  endfunction
  function automatic word_t cf_val(input logic [4:0] kk);
    return word_t'(32 * (int'(kk) - 4));
  endfunction

  assign border   = (pr == 3'd0) || (pr == 3'd5) || (pc == 3'd0) || (pc == 3'd5);
  assign p_addr   = 32'd300 + 32'(pr) * 32'd6 + 32'(pc);
  assign img_addr = 32'd100 + 32'(pr - 3'd1) * 32'd4 + 32'(pc - 3'd1);
  assign tap_addr = 32'd300 + 32'(oy + 3'(kr)) * 32'd6 + 32'(3'(ox) + 3'(kc));
  // Loop counters are written at the falling edge inside the state that
  // advances them, so the branch at the next rising edge sees the advanced
  // values: nine taps are done when kr has reached 3, all pixels when oy
  // has reached 4.
  assign taps_done = (kr == 2'd3);
  assign pix_done  = (oy == 3'd4);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      S_IDLE:  state_nx = S_WAIT;
      S_WAIT:  if (start) state_nx = S_BUSY;
      S_BUSY:  state_nx = S_IMG;
      S_IMG:   if (k == 5'd16) state_nx = S_CF;
      S_CF:    if (k == 5'd25) state_nx = S_ARR0;
      S_ARR0:  state_nx = S_ARR;
      S_ARR:   if (pr == 3'd6) state_nx = S_PROF;
      S_PROF:  state_nx = M;
      M:       state_nx = A;
      A:       state_nx = taps_done ? W : M;
      W:       state_nx = pix_done ? S_END : M;
      default: state_nx = S_IDLE;
    endcase
  end

  assign ready   = (state == S_IDLE) || (state == S_WAIT);
  assign profile = (state == M) || (state == A) || (state == W);

  always_comb begin
    mem1 = MEM_IDLE;
    mem2 = MEM_IDLE;
    fxu  = FXU_IDLE;
    unique case (state)
      S_IMG: begin mem1 = mem_wr(32'd100 + 32'(k), img_val(k)); mem2 = mem_wr(32'd400 + 32'(k), '0); end
      S_CF:  mem1 = mem_wr(32'd200 + 32'(k) - 32'd16, cf_val(k - 5'd16));
      S_ARR: begin
        if (!border) mem1 = mem_rd(img_addr);
        mem2 = mem_wr(p_addr, border ? '0 : mem_rdata1);
      end
      M: begin
        mem1 = mem_rd(32'd200 + 32'(kr) * 32'd3 + 32'(kc));
        mem2 = mem_rd(tap_addr);
        fxu  = fxu_do(FXU_MUL, mem_rdata1, mem_rdata2);
      end
      A: fxu = fxu_do(FXU_ADD, acc, temp1);
      W: mem1 = mem_wr(32'd400 + 32'(oy) * 32'd4 + 32'(ox), acc);
      default: ;
    endcase
  end

  assign acc_nx = (state == A) ? fxu_result : '0;

  // Init counter k runs 0..15 over the image, 16..24 over the coefficients.
  cg_reg #(.W(5),  .XI(XI)) u_k  (.clk, .rst_n, .we(state inside {S_BUSY, S_IMG, S_CF}),
                                  .d(state == S_BUSY ? 5'd0 : k + 5'd1), .q(k));
  // Padded array position, row-major.
  cg_reg #(.W(3),  .XI(XI)) u_pc (.clk, .rst_n, .we(state == S_ARR0 || state == S_ARR),
                                  .d((state == S_ARR0 || pc == 3'd5) ? 3'd0 : pc + 3'd1), .q(pc));
  cg_reg #(.W(3),  .XI(XI)) u_pr (.clk, .rst_n, .we(state == S_ARR0 || state == S_ARR),
                                  .d(state == S_ARR0 ? 3'd0 : pr + 3'(pc == 3'd5)), .q(pr));
  // Tap position: advanced in A, cleared in S_PROF and W.
  cg_reg #(.W(2),  .XI(XI)) u_kc (.clk, .rst_n, .we(state inside {S_PROF, A, W}),
                                  .d((state != A || kc == 2'd2) ? 2'd0 : kc + 2'd1), .q(kc));
  cg_reg #(.W(2),  .XI(XI)) u_kr (.clk, .rst_n, .we(state inside {S_PROF, A, W}),
                                  .d(state == A ? kr + 2'(kc == 2'd2) : 2'd0), .q(kr));
  // Output pixel: advanced in W.
  cg_reg #(.W(2),  .XI(XI)) u_ox (.clk, .rst_n, .we(state == S_PROF || state == W),
                                  .d(state == W ? ox + 2'd1 : 2'd0), .q(ox));
  cg_reg #(.W(3),  .XI(XI)) u_oy (.clk, .rst_n, .we(state == S_PROF || state == W),
                                  .d(state == W ? oy + 3'(ox == 2'd3) : 3'd0), .q(oy));
  cg_reg #(.W(16), .XI(XI)) u_t  (.clk, .rst_n, .we(state == M), .d(fxu_result), .q(temp1));
  cg_reg #(.W(16), .XI(XI)) u_a  (.clk, .rst_n, .we(state inside {S_PROF, A, W}), .d(acc_nx), .q(acc));
endmodule
