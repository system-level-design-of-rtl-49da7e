// part_counter_p2: submachine P2 of the partitioned counter FSMD. It holds
// the original states S1 (count = count + 1) and S2 (countOut = count) with
// the count register, the countOut output latch and the adder, plus the
// added entry and exit states.
//
// P2 rests in its entry state, clock gated, until P1 sends Awake; it then
// runs S1, S2 and its exit state and returns to the entry state. All of its
// flops, the data registers included, are clocked by the partition's gated
// clock gclk, so while P1 is active nothing in P2 toggles. The data
// registers are isolated in this partition and need no transfer at a
// partition change. W is the counter width (8 for the described counter).
module part_counter_p2 #(
  parameter int unsigned W = 8
) (
  input  logic         gclk,     // Clk AND Clk_en2
  input  logic         rst_n,
  input  logic         awake_i,  // Awake2, from P1
  output logic         in_exit,  // P2 is in its exit state
  output logic         active,   // P2 is in S1 or S2
  output logic [W-1:0] count_out
);
  typedef enum logic [1:0] {P2_ENTRY, P2_S1, P2_S2, P2_EXIT} p2_state_e;
  p2_state_e    state, state_nx;
  logic [W-1:0] count;

  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n) state <= P2_ENTRY;
    else        state <= state_nx;

  always_comb begin
    unique case (state)
      P2_ENTRY: state_nx = awake_i ? P2_S1 : P2_ENTRY;
      P2_S1:    state_nx = P2_S2;
      P2_S2:    state_nx = P2_EXIT;
      default:  state_nx = P2_ENTRY;   // P2_EXIT
    endcase
  end

  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n) begin
      count     <= '0;
      count_out <= '0;
    end else begin
      if (state == P2_S1) count     <= count + 1'b1;
      if (state == P2_S2) count_out <= count;
    end

  assign in_exit = (state == P2_EXIT);
  assign active  = (state == P2_S1) || (state == P2_S2);
endmodule
