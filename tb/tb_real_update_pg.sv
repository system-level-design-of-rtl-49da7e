// tb_real_update_pg: runs the power-gated real_update kernel twice in two
// configurations: with the default lookahead (registers woken in time) and
// with T_WAKE = 0 (every register woken on demand, FSMD stalls). Checks the
// result word in both, the profile window (5 cycles, and 5 + 3 * 3 = 14 with
// on-demand wake-up), the number of stall cycles (0 and 9), that all four
// registers are powered off while the kernel waits for start, and that the
// second run, started with all registers off, still gives the right result.
module tb_real_update_pg;
  import codel_pkg::*;
  import tb_fx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic ready0, prof0, ready1, prof1, st0, st1;
  logic [3:0] sl0, sl1;
  fxu_req_t fx0, fx1;
  word_t fr0, fr1, r01, r02, r11, r12;
  mem_req_t m01, m02, m11, m12;

  real_update_pg dut0 (.clk, .rst_n, .start, .ready(ready0), .profile(prof0), .fxu(fx0), .fxu_result(fr0),
                       .mem1(m01), .mem_rdata1(r01), .mem2(m02), .mem_rdata2(r02), .pg_sleep(sl0), .pg_stall(st0));
  fxu     u_fx0 (.opa_i(fx0.opa), .opb_i(fx0.opb), .fpu_op_i(fx0.op), .output_o(fr0));
  dp_mem  u_m0  (.clk, .p1(m01), .rdata1(r01), .p2(m02), .rdata2(r02));

  real_update_pg #(.INIT_A(16'hFE80), .INIT_B(16'h0340), .INIT_C(16'h0123), .T_WAKE(0)) dut1 (
                       .clk, .rst_n, .start, .ready(ready1), .profile(prof1), .fxu(fx1), .fxu_result(fr1),
                       .mem1(m11), .mem_rdata1(r11), .mem2(m12), .mem_rdata2(r12), .pg_sleep(sl1), .pg_stall(st1));
  fxu     u_fx1 (.opa_i(fx1.opa), .opb_i(fx1.opb), .fpu_op_i(fx1.op), .output_o(fr1));
  dp_mem  u_m1  (.clk, .p1(m11), .rdata1(r11), .p2(m12), .rdata2(r12));

  int prof_c0 = 0, prof_c1 = 0, stall_c0 = 0, stall_c1 = 0;
  logic [3:0] seen_sleep = '0;
  always @(posedge clk) begin
    if (prof0) prof_c0++;
    if (prof1) prof_c1++;
    if (st0) stall_c0++;
    if (st1) stall_c1++;
    seen_sleep |= sl0 & sl1;
  end

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
    check(sl0 == 4'hF && sl1 == 4'hF, $sformatf("all registers off while waiting (%b %b)", sl0, sl1));
    for (int run = 0; run < 2; run++) begin
      prof_c0 = 0; prof_c1 = 0; stall_c0 = 0; stall_c1 = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      wait (!ready0 && !ready1);
      wait (ready0 && ready1);
      repeat (5) @(negedge clk);
      check(u_m0.mem[400] == 16'h1500, $sformatf("d default = %h", u_m0.mem[400]));
      check(u_m1.mem[400] == q_add(16'h0123, q_mul(16'hFE80, 16'h0340)), $sformatf("d second = %h", u_m1.mem[400]));
      check(prof_c0 == 5, $sformatf("profile cycles with lookahead %0d (expect 5)", prof_c0));
      check(prof_c1 == 14, $sformatf("profile cycles on demand %0d (expect 14)", prof_c1));
      check(stall_c0 == 0, $sformatf("stalls with lookahead %0d", stall_c0));
      check(stall_c1 == 9, $sformatf("stalls on demand %0d", stall_c1));
      check(sl0 == 4'hF && sl1 == 4'hF, "registers off again after the run");
      u_m0.mem[400] = 16'hDEAD;
      u_m1.mem[400] = 16'hDEAD;
    end
    check(seen_sleep == 4'hF, "every register slept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
