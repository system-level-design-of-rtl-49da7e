// tb_pg_reg: exercises one power-gated, clock-gated register with random
// write requests, hold and hints. Its write-enable path is compared with a
// reference each cycle: the register takes d at the falling edge of a cycle
// with we high, hold low and the register awake (stall low), and keeps its
// value in all other cycles, asleep or not. The stall output must be high
// exactly when a write is requested while the register is not awake.
module tb_pg_reg;
  logic clk = 1'b0, rst_n = 1'b1, we = 1'b0, hold = 1'b0, ss = 1'b0, ws = 1'b0;
  logic [15:0] d = '0, q, m;
  logic stall, asleep;
  int checks = 0, failures = 0, loads = 0, stalls = 0, sleeps = 0;
  always #5 clk = ~clk;

  pg_reg dut (.clk, .rst_n, .we, .hold, .sleep_sugg(ss), .wake_sugg(ws), .d, .q, .stall_o(stall), .asleep_o(asleep));

  // reference controller: 0 on, 1 off, 2 waking
  int mst = 0, mc = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1 checks++;
    if (q !== '0 || asleep) failures++;
    m = '0;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      unique case (mst)
        0: if (ss && !we) mst = 1;
        1: if (ws || we) begin mst = 2; mc = 2; end
        default: begin mc--; if (mc == 0) mst = 0; end
      endcase
      #1;
      we = 1'($urandom_range(0, 3) == 0);
      ss = 1'($urandom_range(0, 2) != 0);
      ws = 1'($urandom_range(0, 5) == 0);
      d  = 16'($urandom);
      #1 checks++;
      if (stall != (we && mst != 0) || asleep != (mst == 1)) begin
        failures++; if (failures < 10) $display("FAIL controller step %0d", i);
      end
      hold = stall || 1'($urandom_range(0, 9) == 0);
      if (stall) stalls++;
      if (asleep) sleeps++;
      if (we && !hold) begin m = d; loads++; end
      @(negedge clk);
      #1 checks++;
      if (q !== m) begin failures++; if (failures < 10) $display("FAIL q step %0d q=%h exp %h", i, q, m); end
    end
    checks++;
    if (loads < 100 || stalls < 50 || sleeps < 100) begin failures++; $display("FAIL coverage %0d %0d %0d", loads, stalls, sleeps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
