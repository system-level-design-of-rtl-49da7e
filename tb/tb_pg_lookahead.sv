// tb_pg_lookahead: builds the sleep/wake hint tables for an 8-state FSM
// with a branch and a loop (0-1-2, 2 branches to 3 or 6, 3-4-5 back to 2,
// 6-7 back to 0; the register is written in state 4) with T_IDLE = 3 and
// T_WAKE = 1, for all three prediction modes and for backward sleep
// prediction combined with all-paths wake search, and compares every table
// entry with a depth-first path search written independently here. A few
// entries are also checked against hand-derived values, and the default
// instance (real_update, register d) is spot-checked.
module tb_pg_lookahead;
  localparam logic [7:0][2:0] S0T = {3'd0, 3'd7, 3'd2, 3'd5, 3'd4, 3'd3, 3'd2, 3'd1};
  localparam logic [7:0][2:0] S1T = {3'd0, 3'd7, 3'd2, 3'd5, 3'd4, 3'd6, 3'd2, 3'd1};
  localparam logic [7:0]      WRM = 8'b0001_0000;

  logic [2:0] st;
  logic [3:0] st14;
  logic [2:0] sl, wk;
  logic sl14, wk14;
  int checks = 0, failures = 0;

  for (genvar m = 0; m < 3; m++) begin : g_m
    pg_lookahead #(.N(8), .SW(3), .SUCC0(S0T), .SUCC1(S1T), .WRITES(WRM), .T_IDLE(3), .T_WAKE(1), .MODE(m))
      u (.state(st), .sleep_sugg(sl[m]), .wake_sugg(wk[m]));
  end
  // Backward prediction for sleep, all paths for wake.
  logic sl_bn, wk_bn;
  pg_lookahead #(.N(8), .SW(3), .SUCC0(S0T), .SUCC1(S1T), .WRITES(WRM), .T_IDLE(3), .T_WAKE(1), .MODE(2), .WAKE_MODE(0))
    u_bn (.state(st), .sleep_sugg(sl_bn), .wake_sugg(wk_bn));
  pg_lookahead u_def (.state(st14), .sleep_sugg(sl14), .wake_sugg(wk14));

  function automatic bit path_writes(input int s, input int depth, input int mode);
    int a, b;
    if (depth == 0) return 0;
    a = int'(S0T[s]);
    b = int'(S1T[s]);
    if (mode == 1) begin a = (a > b) ? a : b; b = a; end
    if (mode == 2) begin a = (a < b) ? a : b; b = a; end
    if (WRM[a] || WRM[b]) return 1;
    return path_writes(a, depth - 1, mode) || path_writes(b, depth - 1, mode);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st14 = '0;
    for (int m = 0; m < 3; m++)
      for (int s = 0; s < 8; s++) begin
        st = 3'(s);
        #1;
        check(sl[m] == (!WRM[s] && !path_writes(s, 3, m)), $sformatf("sleep mode %0d state %0d", m, s));
        check(wk[m] == path_writes(s, 1, m), $sformatf("wake mode %0d state %0d", m, s));
        if (m == 0) begin
          check(sl_bn == (!WRM[s] && !path_writes(s, 3, 2)), $sformatf("backward/none sleep state %0d", s));
          check(wk_bn == path_writes(s, 1, 0), $sformatf("backward/none wake state %0d", s));
        end
      end
    // Hand-derived: state 3 precedes the write, so it asks for wake-up.
    st = 3'd3; #1 check(wk == 3'b111 && sl == 3'b000, "state 3");
    // State 6 leads away from the loop: sleep in every mode.
    st = 3'd6; #1 check(sl == 3'b111, "state 6");
    // State 1: the write is three transitions away only through 2->3, which
    // all-paths and backward prediction follow and forward prediction
    // (2->6) does not.
    st = 3'd1; #1 check(sl == 3'b010, $sformatf("state 1 sleep %b", sl));
    // Default table: register d of real_update, written in states 10, 11.
    st14 = 4'd12; #1 check(sl14 && !wk14, "default: sleep after last write");
    st14 = 4'd7;  #1 check(!sl14 && wk14, "default: wake three states ahead");
    st14 = 4'd6;  #1 check(!wk14, "default: no wake four states ahead");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
