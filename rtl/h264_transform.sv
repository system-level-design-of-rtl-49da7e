// h264_transform: H.264 4x4 forward integer transform (Y = C X C^T with
// C = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]) as a clock-gated FSMD.
//
// Each 1-D pass is the 4-point butterfly: s0 = x0 + x3, s1 = x1 + x2,
// d0 = x0 - x3, d1 = x1 - x2; y0 = s0 + s1, y2 = s0 - s1, y1 = 2 d0 + d1,
// y3 = d0 - 2 d1 (shifts and adds only, no multiplier).
// Protocol: ready is high in IDLE; a start pulse begins a block. In the four
// ROW states the module asks for row row_sel (load high) and must see that
// row on row_in in the same cycle; the row is transformed on the way into
// the 4x4 coefficient register file. In the four COL states column c is
// transformed in place. In DONE coef holds the 16 coefficients (coef[4r+c] =
// Y[r][c]) and done is high for one cycle; coef keeps its value until the
// next block. A block takes 9 cycles from start. Every coefficient register
// is a cg_reg and is clocked only in the one ROW and one COL state that
// write it. DW is the residual width (9 bits: differences of 8-bit
// samples); coefficients are 16-bit, enough for the 6 bits of growth. The
// transform is the standard's; the FSMD schedule and the ports are this
// design's choice.
module h264_transform #(
  parameter int unsigned DW = 9,
  parameter int unsigned XI = codel_pkg::XI_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  ready,
  output logic                  load,
  output logic [1:0]            row_sel,
  input  logic [3:0][DW-1:0]    row_in,   // row_in[c] = X[row_sel][c], signed
  output logic                  done,
  output logic [15:0][15:0]     coef      // signed
);
  typedef enum logic [3:0] {IDLE, ROW0, ROW1, ROW2, ROW3, COL0, COL1, COL2, COL3, DONE} state_e;
  state_e state, state_nx;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= IDLE;
    else        state <= state_nx;

  always_comb begin
    state_nx = state_e'(state + 4'd1);
    if (state == IDLE && !start) state_nx = IDLE;
    if (state == DONE)           state_nx = IDLE;
  end

  assign ready   = (state == IDLE);
  assign done    = (state == DONE);
  assign load    = (state >= ROW0) && (state <= ROW3);
  assign row_sel = 2'(state - ROW0);

  // One shared butterfly, fed with a row from the input or a column of the
  // register file.
  logic signed [15:0] bx [4];
  logic signed [15:0] by [4];
  logic signed [15:0] s0, s1, d0, d1;
  logic [1:0] col;
  assign col = 2'(state - COL0);

  always_comb begin
    for (int k = 0; k < 4; k++)
      bx[k] = load ? 16'($signed(row_in[k])) : $signed(coef[4 * k + int'(col)]);
    s0 = bx[0] + bx[3];
    s1 = bx[1] + bx[2];
    d0 = bx[0] - bx[3];
    d1 = bx[1] - bx[2];
    by[0] = s0 + s1;
    by[1] = (d0 <<< 1) + d1;
    by[2] = s0 - s1;
    by[3] = d0 - (d1 <<< 1);
  end

  for (genvar r = 0; r < 4; r++) begin : g_r
    for (genvar c = 0; c < 4; c++) begin : g_c
      logic we_row, we_col;
      assign we_row = load && (row_sel == 2'(r));
      assign we_col = (state >= COL0) && (state <= COL3) && (col == 2'(c));
      cg_reg #(.W(16), .XI(XI)) u_y (
        .clk, .rst_n, .we(we_row || we_col),
        .d(we_row ? by[c] : by[r]),
        .q(coef[4 * r + c])
      );
    end
  end
endmodule
