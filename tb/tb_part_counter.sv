// tb_part_counter: runs the partitioned counter with random and with held
// inc values against a cycle-level reference of the six-cycle hand-over
// schedule (S0, exit1, S1, S2, exit2, S3; S0, S3 when inc is low). Checked
// after every rising edge: which partition is active, both clock enables,
// both sleep latches and countOut. It also checks that one increment takes
// six cycles and that P2 receives no clock while inc stays low. A second
// copy with a two-cycle supply restore per wake-up must take ten cycles per
// increment (three per partition change).
module tb_part_counter;
  typedef enum int {M_S0, M_X1, M_S1, M_S2, M_X2, M_S3} m_state_e;
  logic clk = 1'b0, rst_n = 1'b1, inc = 1'b0;
  logic [7:0] count_out;
  logic [1:0] clk_en, sleep, active;
  int checks = 0, failures = 0;
  m_state_e ms, mprev;
  logic [7:0] mcount, mout;
  logic p2_ran;
  int incs = 0;

  always #5 clk = ~clk;

  // Second copy with a two-cycle supply restore after each wake-up.
  logic [7:0] count_pw;
  logic [1:0] clk_en_pw, sleep_pw, active_pw;
  part_counter #(.W(8), .T_PWRUP(2)) dut_pw (.clk, .rst_n, .inc, .count_out(count_pw), .clk_en_o(clk_en_pw),
                                             .sleep_o(sleep_pw), .active_o(active_pw));

  part_counter #(.W(8)) dut (.clk, .rst_n, .inc, .count_out, .clk_en_o(clk_en), .sleep_o(sleep), .active_o(active));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (model state %0d)", what, $time, ms);
    end
  endtask

  // One clock: advance the reference, then compare after the rising edge.
  task automatic step();
    @(posedge clk);
    mprev = ms;
    unique case (ms)
      M_S0: ms = inc ? M_X1 : M_S3;
      M_X1: ms = M_S1;
      M_S1: begin ms = M_S2; mcount = mcount + 8'd1; end
      M_S2: begin ms = M_X2; mout = mcount; end
      M_X2: begin ms = M_S3; p2_ran = 1'b1; end
      M_S3: ms = M_S0;
    endcase
    if (mprev == M_S0 && inc) incs++;
    #1;
    check(active[0] == (ms == M_S0 || ms == M_S3), "P1 active");
    check(active[1] == (ms == M_S1 || ms == M_S2), "P2 active");
    check(clk_en[0] == (ms inside {M_S0, M_X1, M_S1, M_S3}), "Clk_en1");
    check(clk_en[1] == (ms inside {M_S1, M_S2, M_X2} || (ms == M_S3 && mprev == M_X2)), "Clk_en2");
    check(sleep[0] == (ms inside {M_S1, M_S2, M_X2}), "sleep latch 1");
    check(sleep[1] == (p2_ran && ms inside {M_S3, M_S0, M_X1}), "sleep latch 2");
    check(count_out == mout, "countOut");
    #2 inc = (mode == 0) ? 1'($urandom_range(0, 1)) : (mode == 1);
  endtask

  int mode;  // 0 random inc, 1 inc held high, 2 inc held low
  int t0, p2_clocks;
  logic [7:0] last;

  initial begin
    ms = M_S0; mprev = M_S0; mcount = '0; mout = '0; p2_ran = 1'b0; mode = 0;
    #1 rst_n = 1'b0;
    #2 check(count_out == 8'd0 && clk_en == 2'b01 && sleep == 2'b00, "reset");
    @(negedge clk) rst_n = 1'b1;
    inc = 1'b1;
    repeat (400) step();
    // Increment period with inc held high: six cycles between updates.
    mode = 1;
    repeat (12) step();
    last = count_out; t0 = 0;
    while (count_out == last && t0 < 20) begin step(); t0++; end
    last = count_out; t0 = 0;
    while (count_out == last && t0 < 20) begin step(); t0++; end
    check(t0 == 6, "six cycles per increment");
    // Same with a two-cycle power-up: 1 + 2 cycles per partition change,
    // ten cycles per increment.
    last = count_pw; t0 = 0;
    while (count_pw == last && t0 < 30) begin step(); t0++; end
    last = count_pw; t0 = 0;
    while (count_pw == last && t0 < 30) begin step(); t0++; end
    check(t0 == 10, $sformatf("ten cycles per increment with power-up delay (%0d)", t0));
    check(count_pw == 8'(last + 8'd1), "power-up copy counts by one");
    // inc held low: P2 stays without clock.
    mode = 2;
    repeat (8) step();
    p2_clocks = 0;
    for (int i = 0; i < 40; i++) begin step(); if (clk_en[1]) p2_clocks++; end
    check(p2_clocks == 0, "P2 clock gated while idle");
    check(incs > 40, "enough increments");
    $display("increments=%0d count_out=%0d", incs, count_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
