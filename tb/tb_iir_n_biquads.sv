// tb_iir_n_biquads: runs the iir_n_biquads kernel with its FXU and memory
// and checks the cascade output (word 301) and the new state of all four
// sections (words 200..207) against the cascade worked out here with
// reference arithmetic, and the 37-cycle profile window (four sections of
// nine states plus the store).
module tb_iir_n_biquads;
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
  iir_n_biquads dut (.clk, .rst_n, .start, .ready, .profile,
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
      word_t y, w, w1, w2, a1, a2, b0, b1, b2;
      int base [5] = '{-64, 32, 128, 64, 32};
      y = 16'h0100;
      for (int s = 0; s < 4; s++) begin
        a1 = 16'(base[0] + 8 * s); a2 = 16'(base[1] + 8 * s); b0 = 16'(base[2] + 8 * s);
        b1 = 16'(base[3] + 8 * s); b2 = 16'(base[4] + 8 * s);
        w1 = 16'(16 * (2 * s + 1)); w2 = 16'(16 * (2 * s + 2));
        w = q_sub(q_sub(y, q_mul(a1, w1)), q_mul(a2, w2));
        y = q_add(q_add(q_mul(b0, w), q_mul(b1, w1)), q_mul(b2, w2));
        check(u_mem.mem[200 + 2 * s] == w && u_mem.mem[201 + 2 * s] == w1,
              $sformatf("section %0d state %h %h exp %h %h", s, u_mem.mem[200 + 2 * s], u_mem.mem[201 + 2 * s], w, w1));
        check(u_mem.mem[100 + 5 * s + 2] == b0, $sformatf("section %0d b0 stored", s));
      end
      check(u_mem.mem[301] == y, $sformatf("y = %h exp %h", u_mem.mem[301], y));
    end
    check(prof_cycles == 37, $sformatf("profile cycles %0d (expect 37)", prof_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
