// tb_h264_transform: transforms random 4x4 residual blocks (values -255..255)
// and checks all 16 coefficients against Y = C X C^T computed here with the
// integer matrix C of the standard, plus a directed DC-only block. Also
// checks the 9-cycle block latency and the row request sequence.
module tb_h264_transform;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, ready, load, done;
  logic [1:0] row_sel;
  logic [3:0][8:0] row_in;
  logic [15:0][15:0] coef;
  int checks = 0, failures = 0;
  int X [4][4];
  int C [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
  always #5 clk = ~clk;

  h264_transform dut (.clk, .rst_n, .start, .ready, .load, .row_sel, .row_in, .done, .coef);

  always_comb for (int c = 0; c < 4; c++) row_in[c] = 9'(X[row_sel][c]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, y, rows;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 200; blk++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          X[r][c] = (blk == 0) ? 10 : $signed(32'($urandom_range(0, 510))) - 255;
      @(negedge clk);
      check(ready, "ready");
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      t = 1; rows = 0;
      while (!done && t < 20) begin
        if (load) begin check(row_sel == 2'(rows), "row order"); rows++; end
        @(negedge clk);
        t++;
      end
      check(t == 9, $sformatf("latency %0d (expect 9)", t));
      check(rows == 4, "four rows requested");
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          y = 0;
          for (int k = 0; k < 4; k++)
            for (int l = 0; l < 4; l++)
              y += C[i][k] * X[k][l] * C[j][l];
          check(int'($signed(coef[4 * i + j])) == y, $sformatf("blk %0d Y[%0d][%0d]=%0d exp %0d", blk, i, j, $signed(coef[4 * i + j]), y));
        end
      if (blk == 0) check(coef[0] == 16'd160 && coef[5] == 16'd0, "DC block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
