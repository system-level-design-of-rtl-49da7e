// tb_counter_fsmd: drives random inc values into the clock-gated counter
// FSMD and checks countOut against a reference that counts the increments;
// with inc held high it checks the four-cycle increment period, with inc
// held low that countOut does not move. Both the 16-bit default and an
// 8-bit instance are run.
module tb_counter_fsmd;
  logic clk = 1'b0, rst_n = 1'b1, inc = 1'b0;
  logic [15:0] out16;
  logic [7:0]  out8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  counter_fsmd dut16 (.clk, .rst_n, .inc, .count_out(out16));
  counter_fsmd #(.W(8)) dut8 (.clk, .rst_n, .inc, .count_out(out8));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: phase 0=S0 1=S1 2=S2 3=S3.
  int ph = 0;
  logic [15:0] mcount = '0, mout = '0;
  int last_change = 0, cyc = 0, period = 0;

  initial begin
    #1 rst_n = 1'b0;
    #1 checks++;
    if (out16 !== '0 || out8 !== '0) failures++;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      if (i < 1000) inc = 1'($urandom_range(0, 1));
      else if (i < 1500) inc = 1'b1;
      else inc = 1'b0;
      @(posedge clk);
      cyc++;
      unique case (ph)
        0: ph = inc ? 1 : 3;
        1: ph = 2;
        2: ph = 3;
        default: ph = 0;
      endcase
      @(negedge clk);
      if (ph == 1) mcount = mcount + 16'd1;
      if (ph == 2) begin
        mout = mcount;
        if (i >= 1100 && i < 1500) begin
          checks++;
          if (cyc - last_change != 4) begin failures++; $display("FAIL period %0d", cyc - last_change); end
        end
        last_change = cyc;
      end
      #1 checks++;
      if (out16 !== mout || out8 !== mout[7:0]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d out=%0d exp %0d", i, out16, mout);
      end
    end
    checks++;
    if (mout < 16'd200) failures++;
    $display("count=%0d", out16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
