// tb_lms: runs the lms kernel with its FXU and memory and checks the
// shifted delay line (words 100..115), the updated coefficients (words
// 200..215) against one LMS step worked out here with reference arithmetic
// (accumulation from the last tap down, update on the shifted line), and
// the 66-cycle profile window.
module tb_lms;
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
  lms dut (.clk, .rst_n, .start, .ready, .profile,
    .fxu(fx), .fxu_result(fr), .mem1(m1), .mem_rdata1(r1), .mem2(m2), .mem_rdata2(r2));
  fxu    u_fx  (.opa_i(fx.opa), .opb_i(fx.opb), .fpu_op_i(fx.op), .output_o(fr));
  dp_mem u_mem (.clk, .p1(m1), .rdata1(r1), .p2(m2), .rdata2(r2));
  always @(posedge clk) if (profile) prof_cycles++;

  initial begin
    repeat (3000) @(posedge clk);
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
      word_t x [16], h [16], y, err;
      for (int i = 0; i < 16; i++) begin x[i] = 16'(32 * (i - 7)); h[i] = 16'(16 * (16 - i)); end
      y = '0;
      for (int i = 15; i >= 0; i--) y = q_add(y, q_mul(x[i], h[i]));
      for (int i = 15; i > 0; i--) x[i] = x[i - 1];
      x[0] = 16'h0080;
      err = q_mul(q_sub(16'h0100, y), 16'h0020);
      for (int i = 0; i < 16; i++) h[i] = q_add(q_mul(x[i], err), h[i]);
      for (int i = 0; i < 16; i++) begin
        check(u_mem.mem[100 + i] == x[i], $sformatf("x[%0d] = %h exp %h", i, u_mem.mem[100 + i], x[i]));
        check(u_mem.mem[200 + i] == h[i], $sformatf("h[%0d] = %h exp %h", i, u_mem.mem[200 + i], h[i]));
      end
      check(err != 0, "non-zero error term");
    end
    check(prof_cycles == 66, $sformatf("profile cycles %0d (expect 66)", prof_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
