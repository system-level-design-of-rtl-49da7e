// tb_convolution_pg: runs two copies of the power-gated convolution kernel,
// each with its own FXU and memory: one at the defaults (backward branch
// prediction) and one searching all paths (MODE = 0). Each copy is started
// twice. Checked per run: the result in word 300 against reference
// arithmetic on the stored operands and the 49-cycle profile window.
// Expected power-gating behaviour, worked out from the state graph:
//   backward: the wait loop and the operand-store loop are predicted to
//   continue, so all four registers are off while the kernel waits
//   (pg_sleep = 1111 before start) and are woken on demand when state 4
//   writes Y: the FSMD stalls T_WAKEUP + 1 = 3 cycles per run, all before
//   the profile window;
//   all paths: from every state a write lies within T_IDLE = 10 states, so
//   no register ever sleeps and nothing stalls.
module tb_convolution_pg;
  import codel_pkg::*;
  import tb_fx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [1:0] ready, profile, stall;
  logic [1:0][3:0] sleep;
  fxu_req_t fx [2]; word_t fr [2], r1 [2], r2 [2]; mem_req_t m1 [2], m2 [2];
  int prof_cycles [2], stall_cycles [2], stall_in_prof [2], sleep_cycles [2];

  convolution_pg dut_b (.clk, .rst_n, .start, .ready(ready[0]), .profile(profile[0]),
    .fxu(fx[0]), .fxu_result(fr[0]), .mem1(m1[0]), .mem_rdata1(r1[0]), .mem2(m2[0]), .mem_rdata2(r2[0]),
    .pg_sleep(sleep[0]), .pg_stall(stall[0]));
  convolution_pg #(.MODE(0)) dut_n (.clk, .rst_n, .start, .ready(ready[1]), .profile(profile[1]),
    .fxu(fx[1]), .fxu_result(fr[1]), .mem1(m1[1]), .mem_rdata1(r1[1]), .mem2(m2[1]), .mem_rdata2(r2[1]),
    .pg_sleep(sleep[1]), .pg_stall(stall[1]));

  for (genvar k = 0; k < 2; k++) begin : g_env
    fxu    u_fx  (.opa_i(fx[k].opa), .opb_i(fx[k].opb), .fpu_op_i(fx[k].op), .output_o(fr[k]));
    dp_mem u_mem (.clk, .p1(m1[k]), .rdata1(r1[k]), .p2(m2[k]), .rdata2(r2[k]));
    always @(posedge clk) begin
      if (profile[k]) prof_cycles[k]++;
      if (stall[k]) stall_cycles[k]++;
      if (stall[k] && profile[k]) stall_in_prof[k]++;
      if (sleep[k] != '0) sleep_cycles[k]++;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expected_y(input int k);
    word_t acc = '0;
    for (int i = 0; i < 16; i++)
      acc = q_add(acc, q_mul(16'((i + 1) * 32), 16'(256 - 24 * (15 - i))));
    return acc;
  endfunction

  initial begin
    for (int k = 0; k < 2; k++) begin prof_cycles[k] = 0; stall_cycles[k] = 0; stall_in_prof[k] = 0; sleep_cycles[k] = 0; end
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      repeat (20) @(posedge clk);
      #1;
      check(sleep[0] == 4'hF, $sformatf("run %0d backward: all registers off while waiting (%b)", run, sleep[0]));
      check(sleep[1] == 4'h0, $sformatf("run %0d all-paths: registers on while waiting (%b)", run, sleep[1]));
      for (int k = 0; k < 2; k++) begin prof_cycles[k] = 0; stall_cycles[k] = 0; stall_in_prof[k] = 0; end
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      wait (ready == 2'b00);
      wait (ready == 2'b11);
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        check(g_env[0].u_mem.mem[300] == expected_y(0) && g_env[1].u_mem.mem[300] == expected_y(1),
              $sformatf("run %0d y = %h / %h exp %h", run, g_env[0].u_mem.mem[300], g_env[1].u_mem.mem[300], expected_y(0)));
        check(prof_cycles[k] == 49, $sformatf("run %0d copy %0d profile cycles %0d (expect 49)", run, k, prof_cycles[k]));
        check(stall_in_prof[k] == 0, $sformatf("run %0d copy %0d stalls inside profile %0d", run, k, stall_in_prof[k]));
      end
      check(stall_cycles[0] == 3, $sformatf("run %0d backward stall cycles %0d (expect 3)", run, stall_cycles[0]));
      check(stall_cycles[1] == 0, $sformatf("run %0d all-paths stall cycles %0d (expect 0)", run, stall_cycles[1]));
    end
    check(sleep_cycles[1] == 0, "all-paths copy never powers a register off");
    $display("backward: sleep cycles %0d", sleep_cycles[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
