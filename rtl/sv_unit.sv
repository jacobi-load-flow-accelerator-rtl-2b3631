// sv_unit: S/V unit, the second stage of the FPGA pipeline.
//
// For row i it forms the conjugate current injection (S(i)/V(i))* and removes
// the inner product handed down by the Q-estimator:
//   R' + jX' = (P - jQ) / (Vr - jVj) - (R + jX)
//            = [(P Vr + Q Vj) + j(P Vj - Q Vr)] / (Vr^2 + Vj^2) - (R + jX)
// P(i) and, for load buses, Q(i) come from a pre-configured per-bus memory
// read by the row index. For generator buses the Q estimate computed
// upstream replaces the stored Q. Six multipliers, three adders, two dividers
// sharing one denominator, and two subtractors, all pipelined; one row per
// clock can enter.
//
// Interface: in_valid/in_data (from qest_ip_unit), out_valid/out_data
// {R', X', row, bus type} to the scaling unit, no back-pressure. cfg_we/
// cfg_addr/cfg_data load {P, Q} (P in bits 63:32) before a solve.
// Latency: 1 (memory read) + MUL_LAT + ADD_LAT + DIV_LAT + ADD_LAT = 27 clocks.
//
// The arithmetic network follows the source design; the memory word layout,
// the read timing and the choice of Q by bus type in this unit are this
// design's own.
module sv_unit
  import jlf_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_BUSES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  ip_out_t                  in_data,
  input  logic                     cfg_we,
  input  logic [$clog2(DEPTH)-1:0] cfg_addr,
  input  logic [63:0]              cfg_data,
  output logic                     out_valid,
  output sv_out_t                  out_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [63:0] pq;
  logic        v1;
  ip_out_t     d1;

  row_mem #(.W(64), .DEPTH(DEPTH)) u_pq (
    .clk, .wr_en(cfg_we), .wr_addr(cfg_addr), .wr_data(cfg_data),
    .rd_en(in_valid), .rd_addr(in_data.row[AW-1:0]), .rd_data(pq)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;

  always_ff @(posedge clk) d1 <= in_data;

  fp_t p, q;
  assign p = pq[63:32];
  assign q = (d1.btype == BUS_GEN) ? d1.q_est : pq[31:0];

  logic m_v;
  fp_t  pvr, qvj, vrvr, vjvj, pvj, qvr;
  fp_mul u_pvr  (.clk, .rst_n, .in_valid(v1), .a(p),     .b(d1.vr), .out_valid(m_v), .y(pvr));
  fp_mul u_qvj  (.clk, .rst_n, .in_valid(v1), .a(q),     .b(d1.vj), .out_valid(),    .y(qvj));
  fp_mul u_vrvr (.clk, .rst_n, .in_valid(v1), .a(d1.vr), .b(d1.vr), .out_valid(),    .y(vrvr));
  fp_mul u_vjvj (.clk, .rst_n, .in_valid(v1), .a(d1.vj), .b(d1.vj), .out_valid(),    .y(vjvj));
  fp_mul u_pvj  (.clk, .rst_n, .in_valid(v1), .a(p),     .b(d1.vj), .out_valid(),    .y(pvj));
  fp_mul u_qvr  (.clk, .rst_n, .in_valid(v1), .a(q),     .b(d1.vr), .out_valid(),    .y(qvr));

  logic a_v;
  fp_t  nr, den, nj;
  fp_addsub u_nr  (.clk, .rst_n, .in_valid(m_v), .a(pvr),  .b(qvj),  .sub(1'b0), .out_valid(a_v), .y(nr));
  fp_addsub u_den (.clk, .rst_n, .in_valid(m_v), .a(vrvr), .b(vjvj), .sub(1'b0), .out_valid(),    .y(den));
  fp_addsub u_nj  (.clk, .rst_n, .in_valid(m_v), .a(pvj),  .b(qvr),  .sub(1'b1), .out_valid(),    .y(nj));

  logic d_v;
  fp_t  cr, cj;
  fp_div u_cr (.clk, .rst_n, .in_valid(a_v), .a(nr), .b(den), .out_valid(d_v), .y(cr));
  fp_div u_cj (.clk, .rst_n, .in_valid(a_v), .a(nj), .b(den), .out_valid(),    .y(cj));

  // Inner product and row side-band, delayed to meet the divider outputs.
  typedef struct packed {
    fp_t       r;
    fp_t       x;
    row_t      row;
    bus_type_e btype;
  } side_t;

  side_t s1, s_div, s_out;
  assign s1 = '{r: d1.r, x: d1.x, row: d1.row, btype: d1.btype};

  delay_line #(.W($bits(side_t)), .DEPTH(MUL_LAT + ADD_LAT + DIV_LAT)) u_sd (.clk, .d(s1), .q(s_div));
  delay_line #(.W($bits(side_t)), .DEPTH(ADD_LAT)) u_so (.clk, .d(s_div), .q(s_out));

  logic o_v;
  fp_t  ro, xo;
  fp_addsub u_ro (.clk, .rst_n, .in_valid(d_v), .a(cr), .b(s_div.r), .sub(1'b1), .out_valid(o_v), .y(ro));
  fp_addsub u_xo (.clk, .rst_n, .in_valid(d_v), .a(cj), .b(s_div.x), .sub(1'b1), .out_valid(),    .y(xo));

  assign out_valid = o_v;
  assign out_data  = '{r: ro, x: xo, row: s_out.row, btype: s_out.btype};

endmodule
