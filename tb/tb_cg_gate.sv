// tb_cg_gate: drives the gate enable the way a Moore controller does (changing
// just after the rising clk edge) and checks that the gated clock equals
// NOT clk AND g at both clock phases, never glitches high while clk is high,
// and gives exactly one pulse per enabled cycle.
module tb_cg_gate;
  logic clk = 1'b0, g = 1'b0, gclk;
  int checks = 0, failures = 0, pulses = 0, enabled = 0;
  always #5 clk = ~clk;

  cg_gate dut (.clk, .g, .gclk);

  always @(posedge gclk) begin
    pulses++;
    checks++;
    if (clk !== 1'b0) begin failures++; $display("FAIL: gclk rose while clk high"); end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      @(posedge clk);
      #1 g = 1'($urandom_range(0, 1));
      if (g) enabled++;
      #2 checks++;   // clk high: gate must be closed
      if (gclk !== 1'b0) begin failures++; $display("FAIL: gclk high during clk high"); end
      @(negedge clk);
      #1 checks++;   // clk low: gclk follows g
      if (gclk !== g) begin failures++; $display("FAIL: gclk=%b g=%b in low phase", gclk, g); end
    end
    @(posedge clk);
    #1 g = 1'b0;
    @(posedge clk);
    checks++;
    if (pulses != enabled) begin failures++; $display("FAIL: pulses %0d enabled %0d", pulses, enabled); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
