// codel_pkg: types and constants shared by the FSMD kernels, the fixed point
// unit (FXU) and the data memory.
//
// Every kernel talks to one FXU and to the two ports of one data memory, in
// the arrangement kernel <-> FXU and kernel <-> memory. The request bundles
// below are those connections. Word width is 16 bits and memory addresses are
// 32 bits, as in the port lists of the kernels. The fixed point format (Q8.8,
// two's complement) is this design's choice: the number of fraction bits is
// not given for the FXU.
package codel_pkg;

  localparam int unsigned DATA_W = 16;   // FXU and memory word
  localparam int unsigned ADDR_W = 32;   // memory address port
  localparam int unsigned FRAC_W = 8;    // fraction bits of the Q8.8 format
  localparam int unsigned XI_DEFAULT = 3; // minimum width of a clock-gated register

  typedef logic [DATA_W-1:0] word_t;

  // FXU operation codes on the 3-bit operation port.
  typedef enum logic [2:0] {
    FXU_ADD  = 3'd0,
    FXU_SUB  = 3'd1,
    FXU_MUL  = 3'd2,
    FXU_DIV  = 3'd3,
    FXU_SQRT = 3'd4
  } fxu_op_e;

  // Kernel -> FXU request (the FXU answers combinationally).
  typedef struct packed {
    word_t   opa;
    word_t   opb;
    fxu_op_e op;
  } fxu_req_t;

  // Kernel -> memory port request; read data comes back combinationally.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    word_t             wdata;
    logic              wr;
  } mem_req_t;

  localparam fxu_req_t FXU_IDLE = '{opa: '0, opb: '0, op: FXU_ADD};
  localparam mem_req_t MEM_IDLE = '{addr: '0, wdata: '0, wr: 1'b0};

  function automatic mem_req_t mem_rd(input logic [ADDR_W-1:0] a);
    return '{addr: a, wdata: '0, wr: 1'b0};
  endfunction

  function automatic mem_req_t mem_wr(input logic [ADDR_W-1:0] a, input word_t d);
    return '{addr: a, wdata: d, wr: 1'b1};
  endfunction

  function automatic fxu_req_t fxu_do(input fxu_op_e op, input word_t a, input word_t b);
    return '{opa: a, opb: b, op: op};
  endfunction

endpackage
