// tb_codel_top: end-to-end test of the complete design at its default
// parameters.
//
// All 15 kernel slots are started together, twice. For each run the
// testbench counts every slot's profile cycles and compares them with the
// kernel schedules (5, 5, 10, 49, 64, 49, 30, 3110, 160, 304, 10, 37, 66, 5,
// 49),
// and reads results back through the host port: real_update (21.0, in the
// plain and the power-gated slot), convolution (plain and power-gated),
// dot_product (7.0), complex_update
// (2.0 + 16.0i), iir_one_biquad (y worked out here). It writes and reads
// back a host word. Meanwhile it drives the clock-gated counter and the
// partitioned counter with random inc and checks both counts, pushes one
// block through the H.264 transform and one line through the DWT and
// checks their outputs and latencies (9 and 17 cycles). Every mechanism
// is counted and must have happened at least once: kernel runs, clock-gated
// counter increments, partition hand-overs in both directions, register
// power-down and wake-up, transform blocks and DWT lines. With the default
// lookahead the power-gated real_update slot must never stall, and the
// power-gated convolution must stall exactly 3 cycles per run.
module tb_codel_top;
  import tb_fx_pkg::*;
  localparam int NK = 15;
  localparam int EXP_CYC [NK] = '{5, 5, 10, 49, 64, 49, 30, 3110, 160, 304, 10, 37, 66, 5, 49};

  logic clk = 1'b0, rst_n = 1'b1;
  logic [NK-1:0] start = '0, ready, profile;
  logic [3:0] pg_sleep;
  logic pg_stall;
  logic [3:0] cpg_sleep;
  logic cpg_stall;
  logic [3:0] host_sel = '0;
  logic [15:0] host_addr = '0, host_wdata = '0, host_rdata;
  logic host_wr = 1'b0;
  logic cnt_inc = 1'b0, pc_inc = 1'b0;
  logic [15:0] cnt_out;
  logic [7:0] pc_out;
  logic [1:0] pc_clk_en, pc_sleep, pc_active;
  logic h_start = 1'b0, h_ready, h_load, h_done;
  logic [1:0] h_row_sel;
  logic [3:0][8:0] h_row_in;
  logic [15:0][15:0] h_coef;
  logic w_start = 1'b0, w_ready, w_take, w_done;
  logic [2:0] w_idx;
  logic [7:0] w_sample;
  logic [7:0][15:0] w_coef;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  codel_top dut (
    .clk, .rst_n, .start, .ready, .profile, .pg_sleep, .pg_stall, .cpg_sleep, .cpg_stall,
    .host_sel, .host_addr, .host_wdata, .host_wr, .host_rdata,
    .cnt_inc, .cnt_out, .pc_inc, .pc_out, .pc_clk_en, .pc_sleep, .pc_active,
    .h_start, .h_ready, .h_load, .h_row_sel, .h_row_in, .h_done, .h_coef,
    .w_start, .w_ready, .w_take, .w_idx, .w_sample, .w_done, .w_coef
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Convolution result from the operand formulas, in reference arithmetic.
  function automatic logic [15:0] conv_y();
    logic [15:0] acc = '0;
    for (int i = 0; i < 16; i++) acc = q_add(acc, q_mul(16'((i + 1) * 32), 16'(256 - 24 * (15 - i))));
    return acc;
  endfunction

  // ---- mechanism counters ----
  int prof_cyc [NK];
  int kernel_runs = 0, pg_sleeps = 0, pg_wakes = 0, pg_stalls = 0, cpg_stalls = 0;
  int hand_12 = 0, hand_21 = 0, h_blocks = 0, w_lines = 0;
  logic [NK-1:0] prof_q = '0;
  logic [3:0] sleep_q = '0;
  logic [1:0] act_q = 2'b01;
  always @(posedge clk) begin
    for (int k = 0; k < NK; k++) begin
      if (profile[k]) prof_cyc[k]++;
      if (prof_q[k] && !profile[k]) kernel_runs++;
    end
    for (int r = 0; r < 4; r++) begin
      if (!sleep_q[r] && pg_sleep[r]) pg_sleeps++;
      if (sleep_q[r] && !pg_sleep[r]) pg_wakes++;
    end
    if (pg_stall) pg_stalls++;
    if (cpg_stall) cpg_stalls++;
    if (act_q[0] && pc_active[1]) hand_12++;
    if (act_q[1] && pc_active[0]) hand_21++;
    if (pc_active != 2'b00) act_q <= pc_active;
    prof_q <= profile;
    sleep_q <= pg_sleep;
    if (h_done) h_blocks++;
    if (w_done) w_lines++;
  end

  // ---- counters: random inc, reference counts ----
  int cnt_ref = 0, cnt_ph = 0;
  always @(posedge clk) if (rst_n) begin
    // clock-gated counter phases: 0=S0 1=S1 2=S2 3=S3
    unique case (cnt_ph)
      0: cnt_ph = cnt_inc ? 1 : 3;
      1: cnt_ph = 2;
      2: begin cnt_ph = 3; cnt_ref++; end
      default: cnt_ph = 0;
    endcase
  end
  logic cnt_run = 1'b1;
  always @(negedge clk) cnt_inc <= cnt_run && 1'($urandom_range(0, 1));

  // ---- host port helpers ----
  task automatic host_read(input int slot, input int addr, output logic [15:0] v);
    @(negedge clk);
    host_sel = 4'(slot); host_addr = 16'(addr); host_wr = 1'b0;
    #1 v = host_rdata;
  endtask
  task automatic host_write(input int slot, input int addr, input logic [15:0] v);
    @(negedge clk);
    host_sel = 4'(slot); host_addr = 16'(addr); host_wdata = v; host_wr = 1'b1;
    @(posedge clk);
    #1 host_wr = 1'b0;
  endtask

  int X [4][4];
  always_comb for (int c = 0; c < 4; c++) h_row_in[c] = 9'(X[h_row_sel][c]);
  int xs [8] = '{12, 200, 37, 90, 255, 0, 64, 128};
  assign w_sample = 8'(xs[w_idx]);

  initial begin
    logic [15:0] v;
    int t, y;
    automatic int C [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    for (int k = 0; k < NK; k++) prof_cyc[k] = 0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) X[r][c] = $signed(32'($urandom_range(0, 510))) - 255;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    check(ready == '1, "all kernel slots ready after reset");
    check(pg_sleep == 4'hF, "power-gated registers off while idle");
    check(cpg_sleep == 4'hF, "power-gated convolution registers off while idle");

    for (int run = 0; run < 2; run++) begin
      for (int k = 0; k < NK; k++) prof_cyc[k] = 0;
      @(negedge clk) start = '1;
      @(negedge clk) start = '0;
      // application circuits run while the kernels work
      h_start = 1'b1;
      @(negedge clk) h_start = 1'b0;
      t = 1;
      while (!h_done && t < 30) begin @(negedge clk); t++; end
      check(t == 9, $sformatf("H.264 block latency %0d", t));
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          y = 0;
          for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) y += C[i][a] * X[a][b] * C[j][b];
          check(int'($signed(h_coef[4 * i + j])) == y, $sformatf("H.264 Y[%0d][%0d]", i, j));
        end
      w_start = 1'b1;
      @(negedge clk) w_start = 1'b0;
      t = 1;
      while (!w_done && t < 40) begin @(negedge clk); t++; end
      check(t == 17, $sformatf("DWT latency %0d", t));
      // d[0] = 200 - floor((12 + 37) / 2) = 176; d[3] = 128 - 64 = 64
      check(w_coef[4] == 16'd176 && w_coef[7] == 16'd64, "DWT high band");
      // s[0] = 12 + floor((176 + 176 + 2) / 4) = 100
      check(w_coef[0] == 16'd100, "DWT low band");
      // partitioned counter: random inc for a while
      repeat (300) begin @(negedge clk); pc_inc = 1'($urandom_range(0, 1)); end
      pc_inc = 1'b0;
      wait (ready == '1);
      repeat (20) @(negedge clk);
      for (int k = 0; k < NK; k++)
        check(prof_cyc[k] == EXP_CYC[k], $sformatf("slot %0d profile cycles %0d (expect %0d)", k, prof_cyc[k], EXP_CYC[k]));
      host_read(0, 400, v);  check(v == 16'h1500, $sformatf("real_update d = %h", v));
      host_read(13, 400, v); check(v == 16'h1500, $sformatf("real_update_pg d = %h", v));
      host_read(3, 300, v);  check(v == conv_y(), $sformatf("convolution y = %h exp %h", v, conv_y()));
      host_read(14, 300, v); check(v == conv_y(), $sformatf("convolution_pg y = %h exp %h", v, conv_y()));
      host_read(1, 300, v);  check(v == 16'h0700, $sformatf("dot_product = %h", v));
      host_read(2, 400, v);  check(v == 16'h0200, $sformatf("complex_update dr = %h", v));
      host_read(2, 450, v);  check(v == 16'h1000, $sformatf("complex_update di = %h", v));
      begin
        logic [15:0] w, yy;
        if (run == 0) begin
          w = q_sub(q_sub(16'h0100, q_mul(16'hFF80, 16'h0080)), q_mul(16'h0040, 16'h0040));
          yy = q_add(q_add(q_mul(16'h0080, w), q_mul(16'h0040, 16'h0080)), q_mul(16'h0020, 16'h0040));
          host_read(10, 500, v); check(v == yy, $sformatf("iir_one_biquad y = %h exp %h", v, yy));
        end
      end
      check(pg_sleep == 4'hF, "power-gated registers off again after the run");
      host_write(5, 900, 16'hBEEF + 16'(run));
      host_read(5, 900, v); check(v == 16'hBEEF + 16'(run), "host write and read back");
      host_read(6, 900, v); check(v != 16'hBEEF + 16'(run), "host write reached only its slot");
    end

    cnt_run = 1'b0;
    repeat (10) @(negedge clk);
    check(kernel_runs == 2 * NK, $sformatf("kernel runs %0d", kernel_runs));
    check(cnt_out == 16'(cnt_ref) && cnt_ref > 0, $sformatf("clock-gated counter %0d exp %0d", cnt_out, cnt_ref));
    check(int'(pc_out) == hand_12 % 256 && hand_12 > 0, $sformatf("partitioned counter %0d, hand-overs %0d", pc_out, hand_12));
    check(hand_21 == hand_12, $sformatf("hand-overs back %0d", hand_21));
    check(pg_sleeps > 0 && pg_wakes > 0, $sformatf("power gating: %0d sleeps, %0d wakes", pg_sleeps, pg_wakes));
    check(pg_stalls == 0, $sformatf("power-gated slot stalled %0d cycles", pg_stalls));
    // Backward prediction misses the exit of the operand-store loop: Y is
    // woken on demand, T_WAKEUP + 1 = 3 stall cycles per run.
    check(cpg_stalls == 6, $sformatf("power-gated convolution stalled %0d cycles (expect 6)", cpg_stalls));
    check(h_blocks == 2 && w_lines == 2, "transform blocks and DWT lines");
    $display("runs=%0d cnt=%0d pc=%0d handovers=%0d/%0d pg sleeps=%0d wakes=%0d conv stalls=%0d h=%0d w=%0d",
             kernel_runs, cnt_out, pc_out, hand_12, hand_21, pg_sleeps, pg_wakes, cpg_stalls, h_blocks, w_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
