// part_counter: the counter FSMD (S0: if inc go to S1 else S3; S1: count++;
// S2: countOut = count; S3: back to S0) split into two communicating
// submachines that are never active at the same time: P1 = {S0, S3} and
// P2 = {S1, S2}, each with an added entry and exit state.
//
// Hand-over, all on the falling clock edge (always-on logic outside the
// partitions): while partition k is in its exit state it raises, for one
// cycle, Sleep_k (sets its own sleep latch) and Awake_j (clears the other
// partition's sleep latch and lets it leave its entry state), and it raises
// Clk_en_j, the clock enable of the other partition. Clk_en_j stays high
// while partition j runs and drops at the falling edge that ends the Sleep_j
// pulse, i.e. half a cycle after partition j's exit state. Each partition's
// clock is GClk_k = Clk AND Clk_en_k; because Clk_en changes only while Clk
// is low, GClk cannot glitch. One increment (inc high) therefore takes six
// cycles: S0, exit1, S1, S2, exit2, S3. With inc low P2 receives no clock at
// all. sleep_o[k] is the power-off request for partition k, for a
// power-gated implementation. T_PWRUP models the time the supply of a woken
// partition needs: the partition waits that many extra cycles in its entry
// state, so each partition change costs 1 + T_PWRUP cycles and one
// increment 6 + 2 * T_PWRUP. The default 0 is the clock-gated counter with
// its six cycles per increment; 2 is the estimated power-up time, which
// gives three cycles per partition change.
// The signal names and the edge on which each control signal moves follow
// the described timing; reset values (P1 active) are this design's choice.
// The two sleep latches are the only level-sensitive storage, on purpose:
// their inputs come from falling-edge flops and cannot glitch.
// Lint reports rst_n as used both synchronously and asynchronously: it is
// the asynchronous reset of the flops and also clears the level-sensitive
// sleep latches, which is intended.
module part_counter #(
  parameter int unsigned W       = 8,
  parameter int unsigned T_PWRUP = 0    // supply restore time of a woken partition, cycles (< 16)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  output logic [W-1:0] count_out,
  output logic [1:0]   clk_en_o,   // {Clk_en2, Clk_en1}
  output logic [1:0]   sleep_o,    // {sleep latch 2, sleep latch 1}
  output logic [1:0]   active_o    // {P2 active, P1 active}
);
  logic sleep1, sleep2, awake1, awake2, clk_en1, clk_en2;
  logic gclk1, gclk2, exit1, exit2;
  logic go1, go2;  // Awake as seen by the partition: supply restored

  // Always-on hand-over logic, falling edge.
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) begin
      sleep1 <= 1'b0; sleep2 <= 1'b0; awake1 <= 1'b0; awake2 <= 1'b0;
      clk_en1 <= 1'b1; clk_en2 <= 1'b0;
    end else begin
      sleep1 <= exit1;
      awake2 <= exit1;
      sleep2 <= exit2;
      awake1 <= exit2;
      if (exit2)       clk_en1 <= 1'b1;
      else if (sleep1) clk_en1 <= 1'b0;
      if (exit1)       clk_en2 <= 1'b1;
      else if (sleep2) clk_en2 <= 1'b0;
    end

  // With T_PWRUP > 0 the woken partition stays in its entry state (clocked,
  // so it can take over the moment the supply is back) for T_PWRUP more
  // cycles after its sleep latch is cleared.
  if (T_PWRUP == 0) begin : g_no_pwrup
    assign go1 = awake1;
    assign go2 = awake2;
  end else begin : g_pwrup
    logic [3:0] wait1, wait2;
    always_ff @(negedge clk or negedge rst_n)
      if (!rst_n) begin
        wait1 <= '0; wait2 <= '0; go1 <= 1'b0; go2 <= 1'b0;
      end else begin
        go1 <= (wait1 == 4'd1);
        go2 <= (wait2 == 4'd1);
        if (exit2)            wait1 <= 4'(T_PWRUP);
        else if (wait1 != '0) wait1 <= wait1 - 4'd1;
        if (exit1)            wait2 <= 4'(T_PWRUP);
        else if (wait2 != '0) wait2 <= wait2 - 4'd1;
      end
  end

  assign gclk1 = clk & clk_en1;
  assign gclk2 = clk & clk_en2;

  part_counter_p1 u_p1 (.gclk(gclk1), .rst_n, .inc, .awake_i(go1), .in_exit(exit1), .active(active_o[0]));
  part_counter_p2 #(.W(W)) u_p2 (.gclk(gclk2), .rst_n, .awake_i(go2), .in_exit(exit2), .active(active_o[1]),
                                 .count_out(count_out));

  sleep_latch u_sl1 (.rst_n, .set_i(sleep1), .reset_i(awake1), .sleep_o(sleep_o[0]));
  sleep_latch u_sl2 (.rst_n, .set_i(sleep2), .reset_i(awake2), .sleep_o(sleep_o[1]));

  assign clk_en_o = {clk_en2, clk_en1};

  // The two partitions never both own the computation.
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(active_o[0] && active_o[1]));
endmodule
