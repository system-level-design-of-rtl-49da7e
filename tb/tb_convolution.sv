// tb_convolution: runs the convolution kernel with its FXU and memory,
// checks the 32 stored operands against x[i] = (i+1)/8, h[i] = 1 - 3i/32,
// works the sum of x[i]*h[15-i] out from the stored words with reference
// arithmetic, compares it with word 300 and checks the 49-cycle profile
// window (16 taps of 3 cycles plus the final write). It also watches the
// FXU: each of the 16 multiplies must pair x[k] with h[15-k], in order.
module tb_convolution;
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
  convolution dut (.clk, .rst_n, .start, .ready, .profile,
    .fxu(fx), .fxu_result(fr), .mem1(m1), .mem_rdata1(r1), .mem2(m2), .mem_rdata2(r2));
  fxu    u_fx  (.opa_i(fx.opa), .opb_i(fx.opb), .fpu_op_i(fx.op), .output_o(fr));
  dp_mem u_mem (.clk, .p1(m1), .rdata1(r1), .p2(m2), .rdata2(r2));
  always @(posedge clk) if (profile) prof_cycles++;

  // Every multiply must pair x[k] with h[15-k], in tap order.
  int nmul = 0;
  always @(negedge clk)
    if (rst_n && fx.op == FXU_MUL && profile) begin
      check(fx.opa == 16'((nmul + 1) * 32) && fx.opb == 16'(256 - 24 * (15 - nmul)),
            $sformatf("multiply %0d operands %h %h", nmul, fx.opa, fx.opb));
      nmul++;
    end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t acc;
    bit ok;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (!ready);
    wait (ready);
    @(negedge clk);
    ok = 1;
    for (int i = 0; i < 16; i++)
      if (u_mem.mem[100+i] != 16'((i + 1) * 32) || u_mem.mem[200+i] != 16'(256 - 24 * i)) ok = 0;
    check(ok, "operands stored");
    acc = '0;
    for (int i = 0; i < 16; i++) acc = q_add(acc, q_mul(u_mem.mem[100+i], u_mem.mem[200+15-i]));
    check(u_mem.mem[300] == acc, $sformatf("y = %h exp %h", u_mem.mem[300], acc));
    check(prof_cycles == 49, $sformatf("profile cycles %0d (expect 49)", prof_cycles));
    check(nmul == 16, $sformatf("%0d multiplies (expect 16)", nmul));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
