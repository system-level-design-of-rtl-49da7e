// tb_fxu: applies random and corner operands for every operation code and
// compares the FXU's combinational result with integer reference arithmetic.
module tb_fxu;
  import codel_pkg::*;
  import tb_fx_pkg::*;
  word_t a, b, r, e;
  fxu_op_e op;
  int checks = 0, failures = 0;
  int per_op [5] = '{default: 0};

  fxu dut (.opa_i(a), .opb_i(b), .fpu_op_i(op), .output_o(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      op = fxu_op_e'($urandom_range(0, 4));
      a  = (i % 7 == 0) ? 16'h0100 : 16'($urandom);
      b  = (i % 11 == 0) ? 16'h0000 : (i % 5 == 0) ? 16'($urandom_range(0, 1023)) : 16'($urandom);
      if (op == FXU_DIV && i % 3 == 0) a = 16'($urandom_range(0, 255)); // keep many quotients in range
      #1;
      unique case (op)
        FXU_ADD:  e = q_add(a, b);
        FXU_SUB:  e = q_sub(a, b);
        FXU_MUL:  e = q_mul(a, b);
        FXU_DIV:  e = q_div(a, b);
        FXU_SQRT: e = q_sqrt(a);
        default:  e = '0;
      endcase
      checks++;
      per_op[int'(op)]++;
      if (r !== e) begin
        failures++;
        $display("FAIL: op=%0d a=%h b=%h got %h exp %h", op, a, b, r, e);
      end
    end
    // a few exact values
    op = FXU_SQRT; a = 16'h0400; #1 checks++; if (r !== 16'h0200) begin failures++; $display("FAIL: sqrt 4"); end
    op = FXU_MUL;  a = 16'h0A00; b = 16'h0200; #1 checks++; if (r !== 16'h1400) begin failures++; $display("FAIL: 10*2"); end
    op = FXU_DIV;  a = 16'h0300; b = 16'h0200; #1 checks++; if (r !== 16'h0180) begin failures++; $display("FAIL: 3/2"); end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (per_op[k] < 100) begin failures++; $display("FAIL: op %0d rarely tested", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
