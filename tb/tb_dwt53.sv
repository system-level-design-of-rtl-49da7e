// tb_dwt53: transforms random 8-sample lines (and a constant and a ramp
// line) and checks all coefficients against the 5/3 lifting equations with
// symmetric extension evaluated here, the 2N+1 = 17-cycle latency, and that
// the inverse lifting steps give back the input (lossless).
module tb_dwt53;
  localparam int N = 8, H = 4;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, ready, take, done;
  logic [2:0] idx;
  logic [7:0] sample;
  logic [N-1:0][15:0] coef;
  int checks = 0, failures = 0;
  int x [N];
  always #5 clk = ~clk;

  dwt53 dut (.clk, .rst_n, .start, .ready, .take, .sample_idx(idx), .sample_in(sample), .done, .coef);

  assign sample = 8'(x[idx]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int fdiv(input int a, input int b);  // floor division
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, d [H], s [H], xr [N], xn, dl;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int line = 0; line < 300; line++) begin
      for (int k = 0; k < N; k++)
        x[k] = (line == 0) ? 77 : (line == 1) ? 30 * k : int'($urandom_range(0, 255));
      @(negedge clk);
      check(ready, "ready");
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      t = 1;
      while (!done && t < 40) begin @(negedge clk); t++; end
      check(t == 2 * N + 1, $sformatf("latency %0d", t));
      for (int n = 0; n < H; n++) begin
        xn = (2 * n + 2 < N) ? x[2 * n + 2] : x[N - 2];
        d[n] = x[2 * n + 1] - fdiv(x[2 * n] + xn, 2);
      end
      for (int n = 0; n < H; n++) begin
        dl = (n == 0) ? d[0] : d[n - 1];
        s[n] = x[2 * n] + fdiv(dl + d[n] + 2, 4);
      end
      for (int n = 0; n < H; n++) begin
        check($signed(coef[n]) == s[n], $sformatf("line %0d s[%0d]=%0d exp %0d", line, n, $signed(coef[n]), s[n]));
        check($signed(coef[H + n]) == d[n], $sformatf("line %0d d[%0d]=%0d exp %0d", line, n, $signed(coef[H + n]), d[n]));
      end
      if (line == 0) check(coef[H] == 16'd0 && coef[0] == 16'd77, "constant line: no high band");
      // Inverse lifting from the hardware coefficients.
      for (int n = 0; n < H; n++) begin
        dl = (n == 0) ? $signed(coef[H]) : $signed(coef[H + n - 1]);
        xr[2 * n] = $signed(coef[n]) - fdiv(dl + $signed(coef[H + n]) + 2, 4);
      end
      for (int n = 0; n < H; n++) begin
        xn = (2 * n + 2 < N) ? xr[2 * n + 2] : xr[N - 2];
        xr[2 * n + 1] = $signed(coef[H + n]) + fdiv(xr[2 * n] + xn, 2);
      end
      for (int k = 0; k < N; k++) check(xr[k] == x[k], $sformatf("line %0d reconstruct %0d", line, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
