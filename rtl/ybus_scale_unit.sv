// ybus_scale_unit: Y-bus scaling unit, the last stage of the FPGA pipeline.
//
// Divides the S/V unit's result by the diagonal admittance of the row,
//   V(i) = (R + jX) / (G + jB) = [(R G + X B) + j(X G - R B)] / (G^2 + B^2)
// and forms the sum of squares Vr^2 + Vj^2 that lets the host hold the
// voltage magnitude of generator buses. {G(i,i), B(i,i)} come from a
// pre-configured per-bus memory read by the row index. The sum of squares is
// reported for generator buses and is 0 for load buses. One row per clock can
// enter.
//
// Interface: in_valid/in_data from sv_unit; out_valid/out_data
// {Vr, Vj, SUMSQ, row} to the result queue, no back-pressure. cfg_we/
// cfg_addr/cfg_data load {G, B} (G in bits 63:32) before a solve.
// Latency: 1 (memory read) + MUL_LAT + ADD_LAT + DIV_LAT + MUL_LAT + ADD_LAT
// = 32 clocks.
//
// The arithmetic network follows the source design; the memory layout and
// the zero sum of squares for load buses are this design's choices.
module ybus_scale_unit
  import jlf_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_BUSES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  sv_out_t                  in_data,
  input  logic                     cfg_we,
  input  logic [$clog2(DEPTH)-1:0] cfg_addr,
  input  logic [63:0]              cfg_data,
  output logic                     out_valid,
  output result_t                  out_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [63:0] gb;
  logic        v1;
  sv_out_t     d1;

  row_mem #(.W(64), .DEPTH(DEPTH)) u_ydiag (
    .clk, .wr_en(cfg_we), .wr_addr(cfg_addr), .wr_data(cfg_data),
    .rd_en(in_valid), .rd_addr(in_data.row[AW-1:0]), .rd_data(gb)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;

  always_ff @(posedge clk) d1 <= in_data;

  fp_t g, b;
  assign g = gb[63:32];
  assign b = gb[31:0];

  logic m_v;
  fp_t  rg, xb, gg, bb, xg, rb;
  fp_mul u_rg (.clk, .rst_n, .in_valid(v1), .a(d1.r), .b(g), .out_valid(m_v), .y(rg));
  fp_mul u_xb (.clk, .rst_n, .in_valid(v1), .a(d1.x), .b(b), .out_valid(),    .y(xb));
  fp_mul u_gg (.clk, .rst_n, .in_valid(v1), .a(g),    .b(g), .out_valid(),    .y(gg));
  fp_mul u_bb (.clk, .rst_n, .in_valid(v1), .a(b),    .b(b), .out_valid(),    .y(bb));
  fp_mul u_xg (.clk, .rst_n, .in_valid(v1), .a(d1.x), .b(g), .out_valid(),    .y(xg));
  fp_mul u_rb (.clk, .rst_n, .in_valid(v1), .a(d1.r), .b(b), .out_valid(),    .y(rb));

  logic a_v;
  fp_t  nr, den, nj;
  fp_addsub u_nr  (.clk, .rst_n, .in_valid(m_v), .a(rg), .b(xb), .sub(1'b0), .out_valid(a_v), .y(nr));
  fp_addsub u_den (.clk, .rst_n, .in_valid(m_v), .a(gg), .b(bb), .sub(1'b0), .out_valid(),    .y(den));
  fp_addsub u_nj  (.clk, .rst_n, .in_valid(m_v), .a(xg), .b(rb), .sub(1'b1), .out_valid(),    .y(nj));

  logic d_v;
  fp_t  vr, vj;
  fp_div u_vr (.clk, .rst_n, .in_valid(a_v), .a(nr), .b(den), .out_valid(d_v), .y(vr));
  fp_div u_vj (.clk, .rst_n, .in_valid(a_v), .a(nj), .b(den), .out_valid(),    .y(vj));

  logic s_m_v, s_v;
  fp_t  vr2, vj2, ss;
  fp_mul    u_vr2 (.clk, .rst_n, .in_valid(d_v), .a(vr), .b(vr), .out_valid(s_m_v), .y(vr2));
  fp_mul    u_vj2 (.clk, .rst_n, .in_valid(d_v), .a(vj), .b(vj), .out_valid(),      .y(vj2));
  fp_addsub u_ss  (.clk, .rst_n, .in_valid(s_m_v), .a(vr2), .b(vj2), .sub(1'b0), .out_valid(s_v), .y(ss));

  typedef struct packed {
    row_t      row;
    bus_type_e btype;
  } side_t;

  side_t s1, s_out;
  fp_t   vr_o, vj_o;
  assign s1 = '{row: d1.row, btype: d1.btype};

  delay_line #(.W($bits(side_t)), .DEPTH(2 * MUL_LAT + 2 * ADD_LAT + DIV_LAT)) u_sd (.clk, .d(s1), .q(s_out));
  delay_line #(.W(64), .DEPTH(MUL_LAT + ADD_LAT)) u_vd (.clk, .d({vr, vj}), .q({vr_o, vj_o}));

  assign out_valid = s_v;
  assign out_data  = '{vr: vr_o, vj: vj_o,
                       sumsq: (s_out.btype == BUS_GEN) ? ss : FP_ZERO,
                       row: s_out.row};

endmodule
