// dp_mem: zero-wait-state dual port data memory of the kernel test bench.
//
// Two identical ports. Reads are combinational: the word at the port address
// appears in the same cycle, so a kernel can present an address and capture
// the data in one state. A write (wr high) takes effect at the falling clk
// edge in the middle of the state, the same edge on which the kernels' data
// registers load, so an address or data register that is updated in that
// state is still seen with its old value. Only the low $clog2(DEPTH) address bits are used. If
// both ports write the same word in one cycle, port 2 wins. The memory is a
// plain array and is not clock gated. Its size (DEPTH) is this design's
// choice; 1024 words cover every address the kernels use.
module dp_mem
  import codel_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic     clk,
  input  mem_req_t p1,
  output word_t    rdata1,
  input  mem_req_t p2,
  output word_t    rdata2
);
  localparam int unsigned IW = $clog2(DEPTH);
  word_t mem [DEPTH];

  assign rdata1 = mem[p1.addr[IW-1:0]];
  assign rdata2 = mem[p2.addr[IW-1:0]];

  always_ff @(negedge clk) begin
    if (p1.wr) mem[p1.addr[IW-1:0]] <= p1.wdata;
    if (p2.wr) mem[p2.addr[IW-1:0]] <= p2.wdata;
  end
endmodule
