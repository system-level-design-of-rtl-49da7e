// pg_lookahead: compile-time power-gating hints for one register of a CoDeL
// FSMD, as a table indexed by the current state.
//
// The FSM is described by parameters: for every state two successors
// (SUCC0, SUCC1; equal for an unconditional transition) and WRITES, the set
// of states that write the register. At elaboration the module walks the
// state graph from every state:
//   sleep_sugg[s] = s does not write the register and no state reachable in
//                   the next T_IDLE transitions writes it;
//   wake_sugg[s]  = a state reachable in the next T_WAKE transitions writes
//                   it.
// At a branch MODE chooses which paths count: 0 follows both successors, 1
// (forward prediction) only the successor with the higher state number, 2
// (backward prediction) only the one with the lower number. WAKE_MODE does
// the same for the wake table and defaults to MODE; WAKE_MODE = 0 with
// MODE = 2 is the "backward for sleep, none for wake" variant. The result is
// two constant bit vectors; at run time the module is a pair of
// multiplexers on the state. Looking ahead along the state graph and the
// three prediction choices follow the described CoDeL-initiated scheme; the
// exact reachability rule is this design's reading of it. Backward
// prediction is the default because it gave the best balance of gating and
// performance loss in the evaluation. T_IDLE defaults
// to 10, the smallest value the evaluation recommends. T_WAKE defaults to
// the two-cycle wake-up time plus the one cycle pg_ctrl needs to react. The
// default FSM is the 14-state real_update schedule with register d (written
// in states 10 and 11); real use always overrides it.
module pg_lookahead #(
  parameter int unsigned       N      = 14,
  parameter int unsigned       SW     = 4,
  parameter logic [N-1:0][SW-1:0] SUCC0 = {4'd0, 4'd13, 4'd12, 4'd11, 4'd10, 4'd9, 4'd8,
                                           4'd7, 4'd6, 4'd5, 4'd4, 4'd3, 4'd2, 4'd1},
  parameter logic [N-1:0][SW-1:0] SUCC1 = {4'd0, 4'd13, 4'd12, 4'd11, 4'd10, 4'd9, 4'd8,
                                           4'd7, 4'd6, 4'd5, 4'd4, 4'd3, 4'd1, 4'd1},
  parameter logic [N-1:0]      WRITES = 14'b00_1100_0000_0000,
  parameter int unsigned       T_IDLE = 10,
  parameter int unsigned       T_WAKE = 3,
  parameter int unsigned       MODE   = 2,
  parameter int unsigned       WAKE_MODE = MODE
) (
  input  logic [SW-1:0] state,
  output logic          sleep_sugg,
  output logic          wake_sugg
);
  // Bit s: some state reached from s in 1..depth transitions writes.
  function automatic logic [N-1:0] write_ahead(input int unsigned depth,
                                               input int unsigned mode);
    logic [N-1:0] res, reach, nxt;
    int unsigned  a, b;
    res = '0;
    for (int unsigned s = 0; s < N; s++) begin
      reach = '0;
      reach[s] = 1'b1;
      for (int unsigned k = 0; k < depth; k++) begin
        nxt = '0;
        for (int unsigned t = 0; t < N; t++) begin
          if (reach[t]) begin
            a = int'(SUCC0[t]);
            b = int'(SUCC1[t]);
            if (mode == 1)      nxt[(a > b) ? a : b] = 1'b1;
            else if (mode == 2) nxt[(a < b) ? a : b] = 1'b1;
            else begin nxt[a] = 1'b1; nxt[b] = 1'b1; end
          end
        end
        reach = nxt;
        if ((reach & WRITES) != '0) res[s] = 1'b1;
      end
    end
    return res;
  endfunction

  localparam logic [N-1:0] SLEEP_T = ~WRITES & ~write_ahead(T_IDLE, MODE);
  localparam logic [N-1:0] WAKE_T  = write_ahead(T_WAKE, WAKE_MODE);

  assign sleep_sugg = (int'(state) < N) ? SLEEP_T[state] : 1'b0;
  assign wake_sugg  = (int'(state) < N) ? WAKE_T[state]  : 1'b0;
endmodule
