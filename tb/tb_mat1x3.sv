// tb_mat1x3: runs the mat1x3 kernel with its FXU and memory twice and checks
// y = H x for all three rows, worked out from the stored operands, and the
// 30-cycle profile window.
module tb_mat1x3;
  import codel_pkg::*;
  import tb_fx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  int checks = 0, failures = 0, prof_cycles = 0;
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic ready, profile;
  fxu_req_t fx; word_t fr, r1, r2; mem_req_t m1, m2;
  mat1x3 dut (.clk, .rst_n, .start, .ready, .profile,
    .fxu(fx), .fxu_result(fr), .mem1(m1), .mem_rdata1(r1), .mem2(m2), .mem_rdata2(r2));
  fxu    u_fx  (.opa_i(fx.opa), .opb_i(fx.opb), .fpu_op_i(fx.op), .output_o(fr));
  dp_mem u_mem (.clk, .p1(m1), .rdata1(r1), .p2(m2), .rdata2(r2));
  always @(posedge clk) if (profile) prof_cycles++;

  // Memory image at the moment profile rises (operands stored by the kernel).
  word_t snap [1024];
  always @(posedge profile) for (int k = 0; k < 1024; k++) snap[k] = u_mem.mem[k];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once();
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (!ready);
    wait (ready);
    @(negedge clk);
  endtask

  initial begin
    word_t acc, e;
    bit ok;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(ready && !profile, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      prof_cycles = 0;
      run_once();
      ok = 1;
      for (int k = 0; k < 9; k++) if (snap[100+k] != 16'(32 * (k - 4))) ok = 0;
      for (int k = 0; k < 3; k++) if (snap[200+k] != 16'(128 * (k + 1))) ok = 0;
      check(ok, "operands stored");
      for (int r = 0; r < 3; r++) begin
        acc = '0;
        for (int k = 0; k < 3; k++) acc = q_add(acc, q_mul(snap[100 + 3*r + k], snap[200+k]));
        check(u_mem.mem[300+r] == acc, $sformatf("y[%0d] = %h exp %h", r, u_mem.mem[300+r], acc));
      end
      check(prof_cycles == 30, $sformatf("profile cycles %0d (expect 30)", prof_cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
