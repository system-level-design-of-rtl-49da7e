// tb_real_update: runs the real_update kernel twice against its FXU and
// memory, with the default and with other operand values, and checks the
// result word, the 5-cycle profile window, the ready handshake and the FXU
// operations issued (one multiply, one add).
module tb_real_update;
  import codel_pkg::*;
  import tb_fx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Two instances: default operands and a second set, to make the test
  // depend on data.
  localparam word_t A2 = 16'hFE80, B2 = 16'h0340, C2 = 16'h0123;

  logic ready0, prof0, ready1, prof1;
  fxu_req_t fx0, fx1;
  word_t fr0, fr1, r01, r02, r11, r12;
  mem_req_t m01, m02, m11, m12;

  real_update dut0 (.clk, .rst_n, .start, .ready(ready0), .profile(prof0), .fxu(fx0), .fxu_result(fr0),
                    .mem1(m01), .mem_rdata1(r01), .mem2(m02), .mem_rdata2(r02));
  fxu     u_fx0 (.opa_i(fx0.opa), .opb_i(fx0.opb), .fpu_op_i(fx0.op), .output_o(fr0));
  dp_mem  u_m0  (.clk, .p1(m01), .rdata1(r01), .p2(m02), .rdata2(r02));

  real_update #(.INIT_A(A2), .INIT_B(B2), .INIT_C(C2)) dut1 (.clk, .rst_n, .start, .ready(ready1), .profile(prof1),
                    .fxu(fx1), .fxu_result(fr1), .mem1(m11), .mem_rdata1(r11), .mem2(m12), .mem_rdata2(r12));
  fxu     u_fx1 (.opa_i(fx1.opa), .opb_i(fx1.opb), .fpu_op_i(fx1.op), .output_o(fr1));
  dp_mem  u_m1  (.clk, .p1(m11), .rdata1(r11), .p2(m12), .rdata2(r12));

  int prof_cycles = 0;
  int fx_mul = 0, fx_add = 0;
  always @(posedge clk) if (prof0) prof_cycles++;
  // FXU operations issued per run: one multiply, one add.
  always @(posedge clk) if (prof0 && fx0.op == FXU_MUL && fx0.opa != 0) fx_mul++;
  always @(posedge clk) if (prof0 && fx0.op == FXU_ADD && fx0.opa != 0) fx_add++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(ready0 && ready1, "ready while idle");
    check(prof_cycles == 0, "no profile before start");
    for (int run = 0; run < 2; run++) begin
      prof_cycles = 0; fx_mul = 0; fx_add = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      wait (!ready0);
      wait (ready0);
      @(negedge clk);
      check(u_m0.mem[400] == q_add(16'h0100, q_mul(16'h0A00, 16'h0200)), $sformatf("d default = %h", u_m0.mem[400]));
      check(u_m0.mem[400] == 16'h1500, "d default = 21.0");
      check(u_m1.mem[400] == q_add(C2, q_mul(A2, B2)), $sformatf("d second = %h", u_m1.mem[400]));
      check(u_m0.mem[100] == 16'h0A00 && u_m0.mem[200] == 16'h0200 && u_m0.mem[300] == 16'h0100, "operands in memory");
      check(prof_cycles == 5, $sformatf("profile cycles %0d (expect 5)", prof_cycles));
      check(fx_mul == 1 && fx_add == 1, $sformatf("FXU ops mul=%0d add=%0d", fx_mul, fx_add));
      // corrupt the result word so the second run must rewrite it
      u_m0.mem[400] = 16'hDEAD;
      u_m1.mem[400] = 16'hDEAD;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
