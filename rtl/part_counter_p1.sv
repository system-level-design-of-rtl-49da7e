// part_counter_p1: submachine P1 of the partitioned counter FSMD. It holds
// the original states S0 (test inc) and S3 (return to S0) plus the added
// exit and entry states used to hand control to P2 and to take it back.
//
// S0 goes to S3 when inc is low and to the exit state when inc is high. The
// exit state lasts one cycle (both partitions are clocked, data would be
// handed over here; the counter needs none) and leads to the entry state,
// where P1 waits, clock gated, until P2 sends Awake; it then continues with
// S3. The state register is clocked by the partition's gated clock gclk.
// The entry/exit structure follows the partitioning scheme; the encoding is
// this design's choice.
module part_counter_p1 (
  input  logic gclk,     // Clk AND Clk_en1
  input  logic rst_n,
  input  logic inc,
  input  logic awake_i,  // Awake1, from P2
  output logic in_exit,  // P1 is in its exit state
  output logic active    // P1 is in S0 or S3 (owns the computation)
);
  typedef enum logic [1:0] {P1_S0, P1_S3, P1_EXIT, P1_ENTRY} p1_state_e;
  p1_state_e state, state_nx;

  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n) state <= P1_S0;
    else        state <= state_nx;

  always_comb begin
    unique case (state)
      P1_S0:    state_nx = inc ? P1_EXIT : P1_S3;
      P1_EXIT:  state_nx = P1_ENTRY;
      P1_ENTRY: state_nx = awake_i ? P1_S3 : P1_ENTRY;
      default:  state_nx = P1_S0;   // P1_S3
    endcase
  end

  assign in_exit = (state == P1_EXIT);
  assign active  = (state == P1_S0) || (state == P1_S3);
endmodule
