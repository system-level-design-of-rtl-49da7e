// tb_dot_product: runs the dot_product kernel with its FXU and memory twice
// and checks the result word against a1*b1 + a2*b2 worked out from the
// operands, the operands stored by the init phase, the 5-cycle profile window
// and the ready handshake.
module tb_dot_product;
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
  localparam word_t A1 = 16'hFD40, B1 = 16'h0123, A2 = 16'h0371, B2 = 16'hFF20;
  dot_product #(.INIT_A1(A1), .INIT_B1(B1), .INIT_A2(A2), .INIT_B2(B2)) dut (.clk, .rst_n, .start, .ready, .profile,
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
    check(ready && !profile, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      prof_cycles = 0;
      u_mem.mem[300] = 16'hDEAD;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      wait (!ready);
      wait (ready);
      @(negedge clk);
      check(u_mem.mem[100] == A1 && u_mem.mem[150] == A2 && u_mem.mem[200] == B1 && u_mem.mem[250] == B2, "operands stored");
      check(u_mem.mem[300] == q_add(q_mul(A2, B2), q_mul(A1, B1)), $sformatf("c = %h", u_mem.mem[300]));
      check(prof_cycles == 5, $sformatf("profile cycles %0d (expect 5)", prof_cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
