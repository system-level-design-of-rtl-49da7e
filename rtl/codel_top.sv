// codel_top: the complete set of CoDeL FSMD circuits side by side, each with
// its own clock-gated registers, as they are evaluated.
//
// Kernel slots (index into start/ready/profile and host_sel):
//    0  real_update
//    1  dot_product
//    2  complex_update
//    3  convolution
//    4  n_real_updates
//    5  fir
//    6  mat1x3
//    7  matrix
//    8  n_complex_updates
//    9  fir2dim
//   10  iir_one_biquad
//   11  iir_n_biquads
//   12  lms
//   13  real_update_pg (power-gated registers)
//   14  convolution_pg (power-gated registers)
// Every kernel slot has its own single-cycle fixed-point unit (fxu) and its
// own zero-wait-state dual-port data memory (dp_mem). A kernel runs on a
// start pulse while its ready output is high, initialises its operands in
// memory, raises profile for the kernel proper and returns to ready. While
// a slot is ready (idle), the host port can read or write its memory
// through memory port 2 (host_sel picks the slot; host_rdata is
// combinational, writes land on the falling clock edge); that is how the
// results are read out. The application circuits are the clock-gated
// counter, the H.264 4x4 integer transform and the 5/3 DWT; part_counter is
// the counter split into two power-gated partitions. All share clk and
// rst_n (asynchronous, active low). The slot list follows the evaluated
// benchmark set; the host port is this design's addition so that results
// can be observed. XI is the clock-gating width threshold, T_WAKEUP and
// T_IDLE configure the power-gated slots. The only latches in the netlist are
// the two sleep latches inside part_counter; they are intended.
// Lint reports rst_n as used both synchronously and asynchronously because
// it also clears the sleep latches of part_counter; that is intended.
module codel_top
  import codel_pkg::*;
#(
  parameter int unsigned XI       = XI_DEFAULT,
  parameter int unsigned T_WAKEUP = 2,
  parameter int unsigned T_IDLE   = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  // kernel slots
  input  logic [14:0]        start,
  output logic [14:0]        ready,
  output logic [14:0]        profile,
  output logic [3:0]         pg_sleep,
  output logic               pg_stall,
  output logic [3:0]         cpg_sleep,
  output logic               cpg_stall,
  // host access to the slot memories
  input  logic [3:0]         host_sel,
  input  logic [15:0]        host_addr,
  input  logic [15:0]        host_wdata,
  input  logic               host_wr,
  output logic [15:0]        host_rdata,
  // clock-gated counter
  input  logic               cnt_inc,
  output logic [15:0]        cnt_out,
  // partitioned counter
  input  logic               pc_inc,
  output logic [7:0]         pc_out,
  output logic [1:0]         pc_clk_en,
  output logic [1:0]         pc_sleep,
  output logic [1:0]         pc_active,
  // H.264 transform
  input  logic               h_start,
  output logic               h_ready,
  output logic               h_load,
  output logic [1:0]         h_row_sel,
  input  logic [3:0][8:0]    h_row_in,
  output logic               h_done,
  output logic [15:0][15:0]  h_coef,
  // 5/3 DWT
  input  logic               w_start,
  output logic               w_ready,
  output logic               w_take,
  output logic [2:0]         w_idx,
  input  logic [7:0]         w_sample,
  output logic               w_done,
  output logic [7:0][15:0]   w_coef
);
  localparam int unsigned NK = 15;

  fxu_req_t fx   [NK];
  word_t    fres [NK];
  mem_req_t m1   [NK];
  mem_req_t m2   [NK];
  mem_req_t m2h  [NK];
  word_t    rd1  [NK];
  word_t    rd2  [NK];

  mem_req_t host_req;
  assign host_req = '{addr: {16'd0, host_addr}, wdata: host_wdata, wr: host_wr};
  real_update #(.XI(XI)) u_real_update (
    .clk, .rst_n, .start(start[0]), .ready(ready[0]), .profile(profile[0]),
    .fxu(fx[0]), .fxu_result(fres[0]), .mem1(m1[0]), .mem_rdata1(rd1[0]),
    .mem2(m2[0]), .mem_rdata2(rd2[0])
  );
  dot_product #(.XI(XI)) u_dot_product (
    .clk, .rst_n, .start(start[1]), .ready(ready[1]), .profile(profile[1]),
    .fxu(fx[1]), .fxu_result(fres[1]), .mem1(m1[1]), .mem_rdata1(rd1[1]),
    .mem2(m2[1]), .mem_rdata2(rd2[1])
  );
  complex_update #(.XI(XI)) u_complex_update (
    .clk, .rst_n, .start(start[2]), .ready(ready[2]), .profile(profile[2]),
    .fxu(fx[2]), .fxu_result(fres[2]), .mem1(m1[2]), .mem_rdata1(rd1[2]),
    .mem2(m2[2]), .mem_rdata2(rd2[2])
  );
  convolution #(.XI(XI)) u_convolution (
    .clk, .rst_n, .start(start[3]), .ready(ready[3]), .profile(profile[3]),
    .fxu(fx[3]), .fxu_result(fres[3]), .mem1(m1[3]), .mem_rdata1(rd1[3]),
    .mem2(m2[3]), .mem_rdata2(rd2[3])
  );
  n_real_updates #(.XI(XI)) u_n_real_updates (
    .clk, .rst_n, .start(start[4]), .ready(ready[4]), .profile(profile[4]),
    .fxu(fx[4]), .fxu_result(fres[4]), .mem1(m1[4]), .mem_rdata1(rd1[4]),
    .mem2(m2[4]), .mem_rdata2(rd2[4])
  );
  fir #(.XI(XI)) u_fir (
    .clk, .rst_n, .start(start[5]), .ready(ready[5]), .profile(profile[5]),
    .fxu(fx[5]), .fxu_result(fres[5]), .mem1(m1[5]), .mem_rdata1(rd1[5]),
    .mem2(m2[5]), .mem_rdata2(rd2[5])
  );
  mat1x3 #(.XI(XI)) u_mat1x3 (
    .clk, .rst_n, .start(start[6]), .ready(ready[6]), .profile(profile[6]),
    .fxu(fx[6]), .fxu_result(fres[6]), .mem1(m1[6]), .mem_rdata1(rd1[6]),
    .mem2(m2[6]), .mem_rdata2(rd2[6])
  );
  matrix #(.XI(XI)) u_matrix (
    .clk, .rst_n, .start(start[7]), .ready(ready[7]), .profile(profile[7]),
    .fxu(fx[7]), .fxu_result(fres[7]), .mem1(m1[7]), .mem_rdata1(rd1[7]),
    .mem2(m2[7]), .mem_rdata2(rd2[7])
  );
  n_complex_updates #(.XI(XI)) u_n_complex_updates (
    .clk, .rst_n, .start(start[8]), .ready(ready[8]), .profile(profile[8]),
    .fxu(fx[8]), .fxu_result(fres[8]), .mem1(m1[8]), .mem_rdata1(rd1[8]),
    .mem2(m2[8]), .mem_rdata2(rd2[8])
  );
  fir2dim #(.XI(XI)) u_fir2dim (
    .clk, .rst_n, .start(start[9]), .ready(ready[9]), .profile(profile[9]),
    .fxu(fx[9]), .fxu_result(fres[9]), .mem1(m1[9]), .mem_rdata1(rd1[9]),
    .mem2(m2[9]), .mem_rdata2(rd2[9])
  );
  iir_one_biquad #(.XI(XI)) u_iir_one_biquad (
    .clk, .rst_n, .start(start[10]), .ready(ready[10]), .profile(profile[10]),
    .fxu(fx[10]), .fxu_result(fres[10]), .mem1(m1[10]), .mem_rdata1(rd1[10]),
    .mem2(m2[10]), .mem_rdata2(rd2[10])
  );
  iir_n_biquads #(.XI(XI)) u_iir_n_biquads (
    .clk, .rst_n, .start(start[11]), .ready(ready[11]), .profile(profile[11]),
    .fxu(fx[11]), .fxu_result(fres[11]), .mem1(m1[11]), .mem_rdata1(rd1[11]),
    .mem2(m2[11]), .mem_rdata2(rd2[11])
  );
  lms #(.XI(XI)) u_lms (
    .clk, .rst_n, .start(start[12]), .ready(ready[12]), .profile(profile[12]),
    .fxu(fx[12]), .fxu_result(fres[12]), .mem1(m1[12]), .mem_rdata1(rd1[12]),
    .mem2(m2[12]), .mem_rdata2(rd2[12])
  );
  real_update_pg #(.T_WAKEUP(T_WAKEUP), .T_IDLE(T_IDLE)) u_real_update_pg (
    .clk, .rst_n, .start(start[13]), .ready(ready[13]), .profile(profile[13]),
    .fxu(fx[13]), .fxu_result(fres[13]), .mem1(m1[13]), .mem_rdata1(rd1[13]),
    .mem2(m2[13]), .mem_rdata2(rd2[13]), .pg_sleep, .pg_stall
  );

  convolution_pg #(.XI(XI), .T_WAKEUP(T_WAKEUP), .T_IDLE(T_IDLE)) u_convolution_pg (
    .clk, .rst_n, .start(start[14]), .ready(ready[14]), .profile(profile[14]),
    .fxu(fx[14]), .fxu_result(fres[14]), .mem1(m1[14]), .mem_rdata1(rd1[14]),
    .mem2(m2[14]), .mem_rdata2(rd2[14]), .pg_sleep(cpg_sleep), .pg_stall(cpg_stall)
  );

  for (genvar k = 0; k < NK; k++) begin : g_slot
    assign m2h[k] = (ready[k] && host_sel == 4'(k)) ? host_req : m2[k];
    fxu    u_fxu (.opa_i(fx[k].opa), .opb_i(fx[k].opb), .fpu_op_i(fx[k].op), .output_o(fres[k]));
    dp_mem u_mem (.clk, .p1(m1[k]), .rdata1(rd1[k]), .p2(m2h[k]), .rdata2(rd2[k]));
  end

  always_comb begin
    host_rdata = '0;
    for (int k = 0; k < NK; k++)
      if (host_sel == 4'(k)) host_rdata = rd2[k];
  end

  counter_fsmd #(.XI(XI)) u_counter (.clk, .rst_n, .inc(cnt_inc), .count_out(cnt_out));

  part_counter u_part_counter (
    .clk, .rst_n, .inc(pc_inc), .count_out(pc_out),
    .clk_en_o(pc_clk_en), .sleep_o(pc_sleep), .active_o(pc_active)
  );

  h264_transform #(.XI(XI)) u_h264 (
    .clk, .rst_n, .start(h_start), .ready(h_ready), .load(h_load), .row_sel(h_row_sel),
    .row_in(h_row_in), .done(h_done), .coef(h_coef)
  );

  dwt53 #(.XI(XI)) u_dwt (
    .clk, .rst_n, .start(w_start), .ready(w_ready), .take(w_take), .sample_idx(w_idx),
    .sample_in(w_sample), .done(w_done), .coef(w_coef)
  );
endmodule
