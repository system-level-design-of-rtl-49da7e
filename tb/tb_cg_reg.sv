// tb_cg_reg: checks a wide (gated) and a narrow (enable-loaded) cg_reg against
// a reference model: with random write enables and data, changed just after
// each rising clk edge, each register must take d at the falling edge of
// every enabled cycle and hold its value otherwise; reset clears both.
module tb_cg_reg;
  logic clk = 1'b0, rst_n = 1'b1, we = 1'b0;
  logic [15:0] d = '0, q16, m16;
  logic [1:0]  q2, m2;
  int checks = 0, failures = 0, loads = 0;
  always #5 clk = ~clk;

  cg_reg #(.W(16), .XI(3)) dut16 (.clk, .rst_n, .we, .d(d), .q(q16));
  cg_reg #(.W(2),  .XI(3)) dut2  (.clk, .rst_n, .we, .d(d[1:0]), .q(q2));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1 checks++;
    if (q16 !== 16'd0 || q2 !== 2'd0) begin failures++; $display("FAIL: reset value"); end
    m16 = '0; m2 = '0;
    @(posedge clk) #1 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk);
      #1 we = 1'($urandom_range(0, 2) == 0);
      d = 16'($urandom);
      #2 checks++;  // before the falling edge nothing has changed yet
      if (q16 !== m16 || q2 !== m2) begin failures++; $display("FAIL: early change"); end
      if (we) begin m16 = d; m2 = d[1:0]; loads++; end
      @(negedge clk);
      #1 checks++;
      if (q16 !== m16 || q2 !== m2) begin
        failures++; $display("FAIL: q16=%h exp %h q2=%h exp %h", q16, m16, q2, m2);
      end
    end
    checks++;
    if (loads < 50) begin failures++; $display("FAIL: too few loads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
