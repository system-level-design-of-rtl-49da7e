// tb_fir2dim: runs the fir2dim kernel with its FXU and memory and checks
// the image and coefficients in memory, the zero-padded 6x6 array, all 16
// output pixels against the 3x3 filter worked out here with reference
// arithmetic (taps accumulated in row-major order) and the 304-cycle
// profile window (16 pixels of 9 two-cycle taps plus a store).
module tb_fir2dim;
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
  fir2dim dut (.clk, .rst_n, .start, .ready, .profile,
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

    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 6; c++) begin
        word_t e;
        e = (r == 0 || r == 5 || c == 0 || c == 5) ? 16'd0 : 16'(16 * (4 * (r - 1) + (c - 1) + 1));
        check(u_mem.mem[300 + 6 * r + c] == e, $sformatf("padded array [%0d][%0d] = %h exp %h", r, c, u_mem.mem[300 + 6 * r + c], e));
      end
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        word_t acc, img;
        acc = '0;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            int py, px;
            py = y + r - 1; px = x + c - 1;
            img = (py < 0 || py > 3 || px < 0 || px > 3) ? 16'd0 : 16'(16 * (4 * py + px + 1));
            acc = q_add(acc, q_mul(16'(32 * (3 * r + c - 4)), img));
          end
        check(u_mem.mem[400 + 4 * y + x] == acc, $sformatf("out[%0d][%0d] = %h exp %h", y, x, u_mem.mem[400 + 4 * y + x], acc));
      end
    check(prof_cycles == 304, $sformatf("profile cycles %0d (expect 304)", prof_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
