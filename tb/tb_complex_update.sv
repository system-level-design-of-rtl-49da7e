// tb_complex_update: runs the complex_update kernel with its FXU and memory
// twice and checks dr and di against the complex product-sum worked out from
// the operands, plus the 10-cycle profile window.
module tb_complex_update;
  import codel_pkg::*;
  import tb_fx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  int checks = 0, failures = 0, prof_cycles = 0;
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam word_t AR = 16'h0180, AI = 16'hFF40, BR = 16'h0260, BI = 16'h0090, CR = 16'hFE00, CI = 16'h0333;
  logic ready, profile;
  fxu_req_t fx; word_t fr, r1, r2; mem_req_t m1, m2;
  complex_update #(.INIT_AR(AR), .INIT_AI(AI), .INIT_BR(BR), .INIT_BI(BI), .INIT_CR(CR), .INIT_CI(CI)) dut (
    .clk, .rst_n, .start, .ready, .profile,
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
    word_t edr, edi;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    edr = q_sub(q_add(CR, q_mul(AR, BR)), q_mul(AI, BI));
    edi = q_add(q_add(CI, q_mul(AR, BI)), q_mul(AI, BR));
    for (int run = 0; run < 2; run++) begin
      prof_cycles = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      wait (!ready);
      wait (ready);
      @(negedge clk);
      check(u_mem.mem[400] == edr, $sformatf("dr = %h exp %h", u_mem.mem[400], edr));
      check(u_mem.mem[450] == edi, $sformatf("di = %h exp %h", u_mem.mem[450], edi));
      check(prof_cycles == 10, $sformatf("profile cycles %0d (expect 10)", prof_cycles));
      u_mem.mem[400] = '0; u_mem.mem[450] = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
