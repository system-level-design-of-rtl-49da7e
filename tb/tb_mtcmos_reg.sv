// tb_mtcmos_reg: clocks random data into the MTCMOS register model with
// random SLEEP and checks that it loads on the rising edge while awake and
// keeps (and still shows) its value while asleep.
module tb_mtcmos_reg;
  logic clk = 1'b0, rst_n = 1'b1, sleep = 1'b0;
  logic [15:0] d = '0, q, m;
  int checks = 0, failures = 0, held = 0;
  always #5 clk = ~clk;

  mtcmos_reg dut (.clk, .rst_n, .sleep, .d, .q);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1 checks++;
    if (q !== '0) failures++;
    m = '0;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      d = 16'($urandom);
      sleep = 1'($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (!sleep) m = d; else held++;
      #1 checks++;
      if (q !== m) begin failures++; if (failures < 10) $display("FAIL step %0d q=%h exp %h", i, q, m); end
      @(negedge clk);
    end
    checks++;
    if (held < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
