// tb_fir: runs the fir kernel with its FXU and memory and checks the
// output sum of h[i]*x[i] worked out from the stored operands, the shifted
// delay line (x[i+1] = old x[i], x[0] = 1.0) and the 49-cycle profile window.
module tb_fir;
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
  fir dut (.clk, .rst_n, .start, .ready, .profile,
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
    for (int i = 0; i < 16; i++)
      if (snap[100+i] != 16'(16 * (16 - i)) || snap[200+i] != 16'(8 * (i + 1) - 64)) ok = 0;
    check(ok, "operands stored");
    acc = '0;
    for (int i = 15; i >= 0; i--) acc = q_add(acc, q_mul(snap[100+i], snap[200+i]));
    check(u_mem.mem[300] == acc, $sformatf("y = %h exp %h", u_mem.mem[300], acc));
    ok = (u_mem.mem[100] == 16'h0100);
    for (int i = 1; i < 16; i++) if (u_mem.mem[100+i] != snap[100+i-1]) ok = 0;
    check(ok, "delay line shifted");
    check(prof_cycles == 49, $sformatf("profile cycles %0d (expect 49)", prof_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
