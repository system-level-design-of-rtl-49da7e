// tb_n_complex_updates: runs the n_complex_updates kernel with its FXU and
// memory and checks, for all 16 elements, the stored operands and dr, di
// (words 400+i, 450+i) against the complex multiply-add worked out here
// with reference arithmetic, and the 160-cycle profile window (16 passes of
// 10 states).
module tb_n_complex_updates;
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
  n_complex_updates dut (.clk, .rst_n, .start, .ready, .profile,
    .fxu(fx), .fxu_result(fr), .mem1(m1), .mem_rdata1(r1), .mem2(m2), .mem_rdata2(r2));
  fxu    u_fx  (.opa_i(fx.opa), .opb_i(fx.opb), .fpu_op_i(fx.op), .output_o(fr));
  dp_mem u_mem (.clk, .p1(m1), .rdata1(r1), .p2(m2), .rdata2(r2));
  always @(posedge clk) if (profile) prof_cycles++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(ready && !profile, "idle and ready after reset");
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (!ready);
    wait (ready);
    @(negedge clk);

    for (int i = 0; i < 16; i++) begin
      word_t ar, ai, br, bi, cr, ci, dr, di;
      ar = 16'(32 * (i + 1)); ai = 16'(256 - 16 * i); br = 16'(128 - 8 * i);
      bi = 16'(16 * i - 64);  cr = 16'(64 * i);       ci = 16'(-32 * i);
      check(u_mem.mem[100+i] == ar && u_mem.mem[150+i] == ai && u_mem.mem[200+i] == br &&
            u_mem.mem[250+i] == bi && u_mem.mem[300+i] == cr && u_mem.mem[350+i] == ci, $sformatf("operands %0d", i));
      dr = q_sub(q_add(cr, q_mul(ar, br)), q_mul(ai, bi));
      di = q_add(q_add(ci, q_mul(ar, bi)), q_mul(ai, br));
      check(u_mem.mem[400+i] == dr, $sformatf("dr[%0d] = %h exp %h", i, u_mem.mem[400+i], dr));
      check(u_mem.mem[450+i] == di, $sformatf("di[%0d] = %h exp %h", i, u_mem.mem[450+i], di));
    end
    check(prof_cycles == 160, $sformatf("profile cycles %0d (expect 160)", prof_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
