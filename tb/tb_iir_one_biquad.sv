// tb_iir_one_biquad: runs the iir_one_biquad kernel with its FXU and
// memory and checks y (word 500) and the new state w1, w2 (words 200, 201)
// against the direct-form-II section worked out here with reference
// arithmetic, and the 10-cycle profile window.
module tb_iir_one_biquad;
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
  iir_one_biquad dut (.clk, .rst_n, .start, .ready, .profile,
    .fxu(fx), .fxu_result(fr), .mem1(m1), .mem_rdata1(r1), .mem2(m2), .mem_rdata2(r2));
  fxu    u_fx  (.opa_i(fx.opa), .opb_i(fx.opb), .fpu_op_i(fx.op), .output_o(fr));
  dp_mem u_mem (.clk, .p1(m1), .rdata1(r1), .p2(m2), .rdata2(r2));
  always @(posedge clk) if (profile) prof_cycles++;

  initial begin
    repeat (2000) @(posedge clk);
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

    begin
      word_t x, w1, w2, b0, b1, b2, a1, a2, w, y;
      x = 16'h0100; w1 = 16'h0080; w2 = 16'h0040; b0 = 16'h0080; b1 = 16'h0040;
      b2 = 16'h0020; a1 = 16'hFF80; a2 = 16'h0040;
      w = q_sub(q_sub(x, q_mul(a1, w1)), q_mul(a2, w2));
      y = q_add(q_add(q_mul(b0, w), q_mul(b1, w1)), q_mul(b2, w2));
      check(u_mem.mem[500] == y, $sformatf("y = %h exp %h", u_mem.mem[500], y));
      check(u_mem.mem[200] == w && u_mem.mem[201] == w1, $sformatf("state %h %h exp %h %h", u_mem.mem[200], u_mem.mem[201], w, w1));
      check(u_mem.mem[300] == b0 && u_mem.mem[302] == b2 && u_mem.mem[401] == a2, "coefficients stored");
    end
    check(prof_cycles == 10, $sformatf("profile cycles %0d (expect 10)", prof_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
