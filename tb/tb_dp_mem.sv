// tb_dp_mem: random reads and writes on both ports checked against a
// reference array: writes land at the falling edge, reads are combinational,
// port 2 wins a same-address collision, high address bits are ignored.
module tb_dp_mem;
  import codel_pkg::*;
  logic clk = 1'b0;
  mem_req_t p1, p2;
  word_t r1, r2;
  word_t model [256];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dp_mem #(.DEPTH(256)) dut (.clk, .p1, .rdata1(r1), .p2, .rdata2(r2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p1 = MEM_IDLE; p2 = MEM_IDLE;
    // fill
    for (int i = 0; i < 256; i += 2) begin
      @(posedge clk);
      p1 = mem_wr(32'(i), 16'($urandom)); p2 = mem_wr(32'(i + 1), 16'($urandom));
      model[i] = p1.wdata; model[i+1] = p2.wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      p1.addr = {24'($urandom), 8'($urandom)}; p1.wdata = 16'($urandom); p1.wr = 1'($urandom_range(0, 3) == 0);
      p2.addr = (i % 9 == 0) ? p1.addr : {24'($urandom), 8'($urandom)};
      p2.wdata = 16'($urandom); p2.wr = 1'($urandom_range(0, 3) == 0);
      #1 checks += 2;
      if (r1 !== model[p1.addr[7:0]]) begin failures++; $display("FAIL: port1 read"); end
      if (r2 !== model[p2.addr[7:0]]) begin failures++; $display("FAIL: port2 read"); end
      if (p1.wr) model[p1.addr[7:0]] = p1.wdata;
      if (p2.wr) model[p2.addr[7:0]] = p2.wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
