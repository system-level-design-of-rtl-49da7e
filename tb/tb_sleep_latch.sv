// tb_sleep_latch: drives random set/reset pulses into the sleep latch and
// compares its output with a reference set/reset model (set has priority,
// neither input holds the last value), including the asynchronous clear.
module tb_sleep_latch;
  logic rst_n = 1'b1, s = 1'b0, r = 1'b0, q, m;
  int checks = 0, failures = 0, sets = 0, resets = 0;

  sleep_latch dut (.rst_n, .set_i(s), .reset_i(r), .sleep_o(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1 checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1; m = 1'b0;
    for (int i = 0; i < 500; i++) begin
      #5 s = 1'($urandom_range(0, 3) == 0);
      r = 1'($urandom_range(0, 3) == 0);
      if (s) begin m = 1'b1; sets++; end
      else if (r) begin m = 1'b0; resets++; end
      #1 checks++;
      if (q !== m) begin failures++; $display("FAIL step %0d q=%b exp %b", i, q, m); end
      #2 s = 1'b0; r = 1'b0;
      #1 checks++;
      if (q !== m) begin failures++; $display("FAIL hold %0d", i); end
    end
    #1 rst_n = 1'b0;
    #1 checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL async clear"); end
    checks++;
    if (sets < 50 || resets < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
