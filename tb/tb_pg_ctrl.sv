// tb_pg_ctrl: drives random hint and write-request sequences into two
// power-gating controllers (T_WAKEUP = 2 and 4) and compares AWAKE, SLEEP and
// stall with a reference state machine every cycle. It also checks that the
// wake-up time is exactly T_WAKEUP cycles from leaving OFF.
module tb_pg_ctrl;
  logic clk = 1'b0, rst_n = 1'b1, ss = 1'b0, ws = 1'b0, wr = 1'b0;
  logic sl2, aw2, st2, sl4, aw4, st4;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pg_ctrl dut2 (.clk, .rst_n, .sleep_sugg(ss), .wake_sugg(ws), .wr_req(wr), .sleep_o(sl2), .awake_o(aw2), .stall_o(st2));
  pg_ctrl #(.T_WAKEUP(4)) dut4 (.clk, .rst_n, .sleep_sugg(ss), .wake_sugg(ws), .wr_req(wr), .sleep_o(sl4), .awake_o(aw4), .stall_o(st4));

  // reference: 0 on, 1 off, 2 waking
  int m2 = 0, m4 = 0, c2 = 0, c4 = 0, wakes = 0, sleeps = 0, stalls = 0;

  task automatic model(inout int m, inout int c, input int tw);
    unique case (m)
      0: if (ss && !wr) m = 1;
      1: if (ws || wr) begin m = 2; c = tw; end
      default: begin c--; if (c == 0) m = 0; end
    endcase
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1 checks++;
    if (!(aw2 && aw4 && !sl2 && !sl4)) failures++;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      ss = 1'($urandom_range(0, 3) != 0);
      ws = 1'($urandom_range(0, 9) == 0);
      wr = 1'($urandom_range(0, 7) == 0);
      #1 checks++;
      if (st2 != (wr && m2 != 0) || st4 != (wr && m4 != 0)) begin
        failures++; if (failures < 10) $display("FAIL stall step %0d", i);
      end
      if (wr && m2 != 0) stalls++;
      @(posedge clk);
      if (m2 == 1 && (ws || wr)) wakes++;
      if (m2 == 0 && ss && !wr) sleeps++;
      model(m2, c2, 2);
      model(m4, c4, 4);
      #1 checks++;
      if (aw2 != (m2 == 0) || sl2 != (m2 == 1) || aw4 != (m4 == 0) || sl4 != (m4 == 1)) begin
        failures++; if (failures < 10) $display("FAIL state step %0d: %0d %0d", i, m2, m4);
      end
      @(negedge clk);
    end
    // Directed: off, then one wake hint; awake exactly 2 and 4 cycles later.
    ss = 1'b1; ws = 1'b0; wr = 1'b0;
    repeat (8) @(negedge clk);
    checks++;
    if (!(sl2 && sl4)) failures++;
    ss = 1'b0; ws = 1'b1;
    @(negedge clk) ws = 1'b0;
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (aw2 != (k > 2) || aw4 != (k > 4)) begin failures++; $display("FAIL wake timing k=%0d", k); end
      @(negedge clk);
    end
    checks++;
    if (wakes < 50 || sleeps < 50 || stalls < 50) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
