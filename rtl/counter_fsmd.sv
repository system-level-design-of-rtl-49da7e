// counter_fsmd: the counter FSMD as a single CoDeL machine with clock-gated
// registers; the unpartitioned reference for part_counter and the "simple
// counter" test circuit.
//
// States: S0 (go to S1 if inc, else S3), S1 (count = count + 1),
// S2 (countOut = count), S3 (back to S0). The state register is clocked by
// the free-running clock on the rising edge. count and countOut are cg_reg
// registers: each gets a clock only in the state that writes it and loads on
// the falling edge of clk. An increment takes four cycles (S0, S1, S2, S3),
// an idle pass two (S0, S3). W defaults to 16 (the counter test circuit);
// the partitioned counter uses 8. The state drives gated clocks through
// cg_gate, which a linter may report as a signal used both as data and as a
// clock: that is how the clock-gating scheme works.
module counter_fsmd #(
  parameter int unsigned W  = 16,
  parameter int unsigned XI = codel_pkg::XI_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  output logic [W-1:0] count_out
);
  typedef enum logic [1:0] {S0, S1, S2, S3} state_e;
  state_e       state, state_nx;
  logic [W-1:0] count;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S0;
    else        state <= state_nx;

  always_comb begin
    unique case (state)
      S0:      state_nx = inc ? S1 : S3;
      S1:      state_nx = S2;
      S2:      state_nx = S3;
      default: state_nx = S0;
    endcase
  end

  cg_reg #(.W(W), .XI(XI)) u_count (.clk, .rst_n, .we(state == S1), .d(count + 1'b1), .q(count));
  cg_reg #(.W(W), .XI(XI)) u_out   (.clk, .rst_n, .we(state == S2), .d(count),        .q(count_out));
endmodule
