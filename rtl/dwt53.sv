// dwt53: one level of the reversible 5/3 discrete wavelet transform
// (JPEG2000 lossless filter) in lifting form, as a clock-gated FSMD.
//
// For a line of N samples x (N even):
//   predict  d[n] = x[2n+1] - floor((x[2n] + x[2n+2]) / 2)
//   update   s[n] = x[2n]   + floor((d[n-1] + d[n] + 2) / 4)
// with symmetric extension at the borders (x[N] = x[N-2], d[-1] = d[0]).
// Protocol: ready is high in IDLE; after a start pulse the module reads one
// sample per cycle from sample_in for N cycles (take high, index sample_idx),
// then runs N/2 predict states and N/2 update states, computing one
// coefficient per state in place, and raises done for one cycle. coef then
// holds s[0..N/2-1] in coef[0..N/2-1] and d[0..N/2-1] in coef[N/2..N-1]. A
// line takes 2N + 1 cycles after start. Every coefficient register is a
// cg_reg, clocked only when the load, predict or update state for it is
// active. N (a power of two, at least 4) defaults to 8 and samples are 8-bit unsigned (image pixels);
// coefficients are 16-bit signed. The lifting equations are the standard
// ones; the schedule, N and the widths are this design's choice.
module dwt53 #(
  parameter int unsigned N  = 8,
  parameter int unsigned XI = codel_pkg::XI_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 ready,
  output logic                 take,
  output logic [$clog2(N)-1:0] sample_idx,
  input  logic [7:0]           sample_in,
  output logic                 done,
  output logic [N-1:0][15:0]   coef      // signed
);
  localparam int unsigned H  = N / 2;
  localparam int unsigned CW = $clog2(N);

  typedef enum logic [2:0] {IDLE, LOAD, PRED, UPD, DONE} state_e;
  state_e         state, state_nx;
  logic [CW-1:0]  cnt, cnt_nx;
  logic [N-1:0][15:0] x;   // samples, then coefficients in place

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
    end else begin
      state <= state_nx;
      cnt   <= cnt_nx;
    end

  always_comb begin
    state_nx = state;
    cnt_nx   = cnt + 1'b1;
    unique case (state)
      IDLE: begin cnt_nx = '0; if (start) state_nx = LOAD; end
      LOAD: if (cnt == CW'(N - 1)) begin state_nx = PRED; cnt_nx = '0; end
      PRED: if (cnt == CW'(H - 1)) begin state_nx = UPD;  cnt_nx = '0; end
      UPD:  if (cnt == CW'(H - 1)) state_nx = DONE;
      default: begin state_nx = IDLE; cnt_nx = '0; end
    endcase
  end

  assign ready      = (state == IDLE);
  assign take       = (state == LOAD);
  assign sample_idx = cnt;
  assign done       = (state == DONE);

  // Lifting arithmetic for coefficient index cnt (one of each per state).
  logic signed [15:0] xe, xe2, xo, dl, pred_v, upd_v;
  logic [CW-1:0] i_odd, i_even, i_next, i_dl;
  always_comb begin
    i_even = {cnt[CW-2:0], 1'b0};
    i_odd  = {cnt[CW-2:0], 1'b1};
    i_next = (cnt == CW'(H - 1)) ? CW'(N - 2) : i_even + CW'(2);  // symmetric extension
    i_dl   = (cnt == '0) ? CW'(1) : i_even - CW'(1);              // d[-1] = d[0]
    xe     = $signed(x[i_even]);
    xe2    = $signed(x[i_next]);
    xo     = $signed(x[i_odd]);
    dl     = $signed(x[i_dl]);
    pred_v = xo - ((xe + xe2) >>> 1);
    upd_v  = xe + ((dl + xo + 16'sd2) >>> 2);
  end

  for (genvar k = 0; k < N; k++) begin : g_x
    logic we_load, we_pred, we_upd;
    assign we_load = take && (cnt == CW'(k));
    assign we_pred = (state == PRED) && (k % 2 == 1) && (int'(cnt) == k / 2);
    assign we_upd  = (state == UPD)  && (k % 2 == 0) && (int'(cnt) == k / 2);
    cg_reg #(.W(16), .XI(XI)) u_x (
      .clk, .rst_n, .we(we_load || we_pred || we_upd),
      .d(we_load ? {8'd0, sample_in} : (we_pred ? pred_v : upd_v)),
      .q(x[k])
    );
  end

  // Output order: low band s[0..H-1] then high band d[0..H-1].
  for (genvar k = 0; k < H; k++) begin : g_out
    assign coef[k]     = x[2 * k];
    assign coef[H + k] = x[2 * k + 1];
  end
endmodule
