// jacobi_pipeline: FPGA pipeline of the Jacobi (or Gauss-Seidel) full-AC load
// flow accelerator.
//
// One pass of a row through the pipe computes the Jacobi update of one bus
// voltage,
//   V(i) <- (1/Y(i,i)) [ (S(i)/V(i))* - sum_{k != i} Y(i,k) V(k) ],
// with the reactive injection of generator buses estimated on the way. The
// host (pipe management, in software) queues row packets; the pipe computes
// the new V(i) and its sum of squares and queues them for the host (back-end
// processing, in software), which fixes generator voltage magnitudes, tests
// convergence and sends the next iteration. Jacobi and Gauss-Seidel differ
// only in how the host schedules rows; the hardware is the same.
//
// Chain: input queue -> Q-estimator/inner product -> S/V -> Y-bus scaling ->
// result queue. Inside the chain nothing stalls: a row, once started, runs to
// the result queue at a fixed latency. To keep that promise the pipe starts a
// row only while the rows in flight plus the rows waiting in the result
// queue are fewer than OUT_DEPTH (a credit count; this design's own choice,
// the source design does not say how a full result queue is handled).
//
// Interface
//   cfg_we/cfg_sel/cfg_addr/cfg_data: load per-bus data before a solve;
//     cfg_sel 0 writes {P, Q} (S/V unit), 1 writes {G(i,i), B(i,i)} (scaling
//     unit), the first value in bits 63:32.
//   in_valid/in_ready/in_elem: row-packet elements, diagonal first.
//   out_valid/out_ready/out_result: {Vr, Vj, SUMSQ, row} per row.
//   row_start, pad_slot, credit_stall: one-clock status pulses (a row entered
//     the pipe; a zero slot was issued for a short or long row; no row may
//     start because the result queue could overflow).
// Timing: one element slot per clock, a row takes ceil(NZ/4)*4 slots;
// latency from a row's last slot to its result entering the result queue is
// 30 + 27 + 32 = 89 clocks, and it shows at out_valid one clock after that.
module jacobi_pipeline
  import jlf_pkg::*;
#(
  parameter int unsigned N_BUS     = MAX_BUSES,
  parameter int unsigned IN_DEPTH  = 256,
  parameter int unsigned OUT_DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic                     cfg_sel,
  input  logic [$clog2(N_BUS)-1:0] cfg_addr,
  input  logic [63:0]              cfg_data,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  elem_t                    in_elem,
  output logic                     out_valid,
  input  logic                     out_ready,
  output result_t                  out_result,
  output logic                     row_start,
  output logic                     pad_slot,
  output logic                     credit_stall
);

  localparam int unsigned CW = $clog2(OUT_DEPTH) + 1;

  // ------------------------------------------------------------ input queue
  logic  iq_valid, iq_ready;
  elem_t iq_data;

  sync_fifo #(.W($bits(elem_t)), .DEPTH(IN_DEPTH)) u_in_q (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(in_elem),
    .out_valid(iq_valid), .out_ready(iq_ready), .out_data(iq_data),
    .count()
  );

  // ------------------------------------------------------- credit counter
  logic [CW-1:0] outstanding;
  logic          row_ok, pop;

  assign row_ok       = outstanding < CW'(OUT_DEPTH);
  assign credit_stall = !row_ok;
  assign pop          = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) outstanding <= '0;
    else        outstanding <= outstanding + CW'(row_start) - CW'(pop);

  // ------------------------------------------------------------- the pipe
  logic    ip_v, sv_v, ys_v;
  ip_out_t ip_d;
  sv_out_t sv_d;
  result_t ys_d;

  qest_ip_unit u_qest (
    .clk, .rst_n,
    .in_valid(iq_valid), .in_ready(iq_ready), .in_elem(iq_data),
    .row_ok, .row_start, .pad_slot,
    .out_valid(ip_v), .out_data(ip_d)
  );

  sv_unit #(.DEPTH(N_BUS)) u_sv (
    .clk, .rst_n,
    .in_valid(ip_v), .in_data(ip_d),
    .cfg_we(cfg_we && !cfg_sel), .cfg_addr, .cfg_data,
    .out_valid(sv_v), .out_data(sv_d)
  );

  ybus_scale_unit #(.DEPTH(N_BUS)) u_ys (
    .clk, .rst_n,
    .in_valid(sv_v), .in_data(sv_d),
    .cfg_we(cfg_we && cfg_sel), .cfg_addr, .cfg_data,
    .out_valid(ys_v), .out_data(ys_d)
  );

  // ------------------------------------------------------------ result queue
  logic rq_ready;

  sync_fifo #(.W($bits(result_t)), .DEPTH(OUT_DEPTH)) u_out_q (
    .clk, .rst_n,
    .in_valid(ys_v), .in_ready(rq_ready), .in_data(ys_d),
    .out_valid, .out_ready, .out_data(out_result),
    .count()
  );

  // The credit count guarantees the result queue never refuses a result.
  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) ys_v |-> rq_ready);
  a_credit:  assert property (@(posedge clk) disable iff (!rst_n) outstanding <= CW'(OUT_DEPTH));

  initial assert (N_BUS <= MAX_BUSES) else $error("jacobi_pipeline: N_BUS exceeds MAX_BUSES");

endmodule
