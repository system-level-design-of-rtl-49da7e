// tb_matrix: runs the matrix kernel with its FXU and memory and checks all
// 100 elements of C = A B, worked out from the stored operands, and the
// 3110-cycle profile window.
module tb_matrix;
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
  matrix dut (.clk, .rst_n, .start, .ready, .profile,
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
    prof_cycles = 0;
    run_once();
    ok = 1;
    for (int k = 0; k < 100; k++)
      if (snap[100+k] != 16'(16 * ((7 * k) % 11 - 5)) || snap[200+k] != 16'(16 * ((5 * k) % 13 - 6))) ok = 0;
    check(ok, "operands stored");
    ok = 1;
    for (int r = 0; r < 10; r++)
      for (int cc = 0; cc < 10; cc++) begin
        acc = '0;
        for (int k = 0; k < 10; k++) acc = q_add(acc, q_mul(snap[100 + 10*r + k], snap[200 + 10*k + cc]));
        if (u_mem.mem[300 + 10*r + cc] != acc) begin
          ok = 0; $display("C[%0d][%0d] = %h exp %h", r, cc, u_mem.mem[300 + 10*r + cc], acc);
        end
        checks++;
        if (u_mem.mem[300 + 10*r + cc] != acc) failures++;
      end
    check(ok, "all of C");
    check(prof_cycles == 3110, $sformatf("profile cycles %0d (expect 3110)", prof_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
