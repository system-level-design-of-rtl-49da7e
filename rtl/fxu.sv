// fxu: single-cycle 16-bit fixed point unit shared by the FSMD kernels.
//
// Purely combinational: the kernel drives the two operands and the operation
// code during a state and captures the result at the end of that same state,
// so every operation takes one cycle. Operation codes are add (0), subtract
// (1), multiply (2), divide (3) and square root (4) of operand A.
// Numbers are Q8.8 two's complement (this design's choice). Add and subtract
// wrap around. Multiply keeps bits [23:8] of the 32-bit product (truncation).
// Divide computes (A * 256) / B truncated toward zero; division by zero gives
// the largest positive value 0x7FFF. Square root treats A as non-negative (a
// negative A gives 0) and returns floor(sqrt(A * 256)), the Q8.8 root.
module fxu
  import codel_pkg::*;
(
  input  word_t   opa_i,
  input  word_t   opb_i,
  input  fxu_op_e fpu_op_i,
  output word_t   output_o
);
  logic signed [31:0] prod;
  logic signed [31:0] num;
  logic signed [31:0] quot;
  logic        [23:0] rad;
  logic        [11:0] root;
  logic        [23:0] trial;

  assign prod = $signed(opa_i) * $signed(opb_i);
  assign num  = $signed(opa_i) * (32'sd1 <<< FRAC_W);
  assign quot = (opb_i == '0) ? 32'sd32767 : num / 32'($signed(opb_i));

  // Bitwise square root of the 24-bit radicand A * 256.
  always_comb begin
    rad  = opa_i[15] ? 24'd0 : {opa_i, FRAC_W'(0)};
    root = '0;
    for (int b = 11; b >= 0; b--) begin
      trial = 24'({root | 12'(1 << b)}) * 24'({root | 12'(1 << b)});
      if (trial <= rad) root = root | 12'(1 << b);
    end
  end

  always_comb begin
    unique case (fpu_op_i)
      FXU_ADD:  output_o = opa_i + opb_i;
      FXU_SUB:  output_o = opa_i - opb_i;
      FXU_MUL:  output_o = prod[15+FRAC_W:FRAC_W];
      FXU_DIV:  output_o = quot[15:0];
      FXU_SQRT: output_o = {4'd0, root};
      default:  output_o = '0;
    endcase
  end
endmodule
