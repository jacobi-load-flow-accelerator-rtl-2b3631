// qest_ip_unit: Q-estimator / inner-product unit, the first stage of the FPGA
// pipeline.
//
// For each row i it computes, from the row packet queued by the host,
//   I(i)  = sum over all non-zeros k of Y(i,k) V(k)           (complex)
//   R + jX = I(i) - Y(i,i) V(i)    the inner product that omits the diagonal
//   Q(i)  = Vj(i) Re I(i) - Vr(i) Im I(i)   the reactive-injection estimate
// and hands {Q, R, X, V(i), row, bus type} to the S/V unit. Q is computed for
// every row; the S/V unit uses it only for generator buses. Real and
// imaginary parts run in two parallel halves.
//
// Structure (per half): two multipliers and an adder form Y(i,k) V(k) for one
// element per clock. An accumulating adder adds each product to one of four
// lane partial sums held in a 4-entry buffer (element k goes to lane k mod 4).
// Because the adder has four stages, element k+4 meets the partial sum of
// element k as it leaves the adder, so a long row streams at one element per
// clock. When the row's last slot leaves the accumulator, two adders add the
// lane pairs and a third adds the two halves. Two adders then remove the
// diagonal term, and two multipliers and an adder form Q.
//
// Row slots: a row occupies ceil(NZ/4)*4 issue slots (NZ = row length). Slots
// beyond NZ are filled with zero elements ("pad" slots), so a row with fewer
// than four elements still costs four clocks and a row with five costs eight:
// these pads are the pipeline bubbles caused by rows denser than four
// elements. A new row starts only when row_ok is high; inside a row the unit
// never stalls except to wait for an element the queue does not yet hold.
//
// Interface: in_valid/in_ready/in_elem take elements (diagonal element first,
// its V is V(i); the row length is read from the first element). row_start
// pulses when a row's first element is taken, pad_slot when a pad is issued.
// out_valid/out_data: one result per row, no back-pressure.
// Latency from the clock that issues the last slot of a row to out_valid:
// 2*MUL_LAT + 5*ADD_LAT = 30 clocks with the default cores.
//
// Follows the source design: the multiplier/adder network, the 4-entry
// buffer, the parallel Q estimate, what is passed downstream. This design's
// own choices: the diagonal-first packet order, the lane/slot scheme and the
// subtraction of the diagonal term after the sum.
module qest_ip_unit
  import jlf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  elem_t   in_elem,
  input  logic    row_ok,
  output logic    row_start,
  output logic    pad_slot,
  output logic    out_valid,
  output ip_out_t out_data
);

  // ---------------------------------------------------------------- issue
  logic        in_row;
  len_t        slot, nz, last_slot;
  row_t        cur_row;
  bus_type_e   cur_type;

  logic        take, pad, issue;
  len_t        s_idx, s_last;
  len_t        nz_new;
  fp_t         i_g, i_b, i_vr, i_vj;

  // last slot index of a row of n elements: ceil(n/4)*4 - 1
  function automatic len_t last_of(input len_t n);
    len_t r;
    r = (n + len_t'(LANES - 1)) & ~len_t'(LANES - 1);
    return r - len_t'(1);
  endfunction

  assign nz_new = (in_elem.row_len == '0) ? len_t'(1) : in_elem.row_len;

  always_comb begin
    take     = 1'b0;
    pad      = 1'b0;
    in_ready = 1'b0;
    if (!in_row) begin
      in_ready = row_ok;
      take     = in_valid && row_ok;
    end else if (slot < nz) begin
      in_ready = 1'b1;
      take     = in_valid;
    end else begin
      pad = 1'b1;
    end
    issue  = take || pad;
    s_idx  = in_row ? slot : len_t'(0);
    s_last = in_row ? last_slot : last_of(nz_new);
    i_g    = take ? in_elem.g  : FP_ZERO;
    i_b    = take ? in_elem.b  : FP_ZERO;
    i_vr   = take ? in_elem.vr : FP_ZERO;
    i_vj   = take ? in_elem.vj : FP_ZERO;
  end

  assign row_start = take && !in_row;
  assign pad_slot  = pad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_row    <= 1'b0;
      slot      <= '0;
      nz        <= '0;
      last_slot <= '0;
      cur_row   <= '0;
      cur_type  <= BUS_LOAD;
    end else if (issue) begin
      if (!in_row) begin
        in_row    <= 1'b1;
        slot      <= len_t'(1);
        nz        <= nz_new;
        last_slot <= last_of(nz_new);
        cur_row   <= in_elem.row;
        cur_type  <= in_elem.btype;
      end else begin
        slot <= slot + len_t'(1);
        if (slot == last_slot) in_row <= 1'b0;
      end
    end
  end

  // Side-band of one element slot.
  typedef struct packed {
    logic [1:0] lane;
    logic       first_pass;
    logic       last;
    logic       diag;
    row_t       row;
    bus_type_e  btype;
    fp_t        vr;
    fp_t        vj;
  } slot_t;

  slot_t i_sb, c_sb, a_sb;
  assign i_sb = '{lane:       s_idx[1:0],
                  first_pass: s_idx < len_t'(LANES),
                  last:       s_idx == s_last,
                  diag:       s_idx == '0,
                  row:        in_row ? cur_row : in_elem.row,
                  btype:      in_row ? cur_type : in_elem.btype,
                  vr:         i_vr,
                  vj:         i_vj};

  // ------------------------------------------------- element products
  logic m_v;
  fp_t  m_gvr, m_nbvj, m_gvj, m_bvr;
  fp_t  i_nb;
  assign i_nb = {~i_b[31], i_b[30:0]};

  fp_mul u_m_gvr  (.clk, .rst_n, .in_valid(issue), .a(i_g),  .b(i_vr), .out_valid(m_v), .y(m_gvr));
  fp_mul u_m_nbvj (.clk, .rst_n, .in_valid(issue), .a(i_nb), .b(i_vj), .out_valid(),    .y(m_nbvj));
  fp_mul u_m_gvj  (.clk, .rst_n, .in_valid(issue), .a(i_g),  .b(i_vj), .out_valid(),    .y(m_gvj));
  fp_mul u_m_bvr  (.clk, .rst_n, .in_valid(issue), .a(i_b),  .b(i_vr), .out_valid(),    .y(m_bvr));

  logic c_v;
  fp_t  c_r, c_j;
  fp_addsub u_c_r (.clk, .rst_n, .in_valid(m_v), .a(m_gvr), .b(m_nbvj), .sub(1'b0), .out_valid(c_v), .y(c_r));
  fp_addsub u_c_j (.clk, .rst_n, .in_valid(m_v), .a(m_gvj), .b(m_bvr),  .sub(1'b0), .out_valid(),    .y(c_j));

  delay_line #(.W($bits(slot_t)), .DEPTH(MUL_LAT + ADD_LAT)) u_sb_c (.clk, .d(i_sb), .q(c_sb));

  // -------------------------------------------------- lane accumulator
  logic a_v;
  fp_t  a_r, a_j;
  fp_t  buf_r [LANES];
  fp_t  buf_j [LANES];
  fp_t  op_r, op_j;

  always_comb begin
    if (c_sb.first_pass) begin
      op_r = FP_ZERO;
      op_j = FP_ZERO;
    end else if (a_v && a_sb.lane == c_sb.lane) begin
      op_r = a_r;          // partial sum of this lane is leaving the adder now
      op_j = a_j;
    end else begin
      op_r = buf_r[c_sb.lane];
      op_j = buf_j[c_sb.lane];
    end
  end

  fp_addsub u_a_r (.clk, .rst_n, .in_valid(c_v), .a(c_r), .b(op_r), .sub(1'b0), .out_valid(a_v), .y(a_r));
  fp_addsub u_a_j (.clk, .rst_n, .in_valid(c_v), .a(c_j), .b(op_j), .sub(1'b0), .out_valid(),    .y(a_j));

  delay_line #(.W($bits(slot_t)), .DEPTH(ADD_LAT)) u_sb_a (.clk, .d(c_sb), .q(a_sb));

  always_ff @(posedge clk)
    if (a_v) begin
      buf_r[a_sb.lane] <= a_r;
      buf_j[a_sb.lane] <= a_j;
    end

  // ------------------------------------- per-row side-band (diagonal term)
  typedef struct packed {
    row_t      row;
    bus_type_e btype;
    fp_t       vr;
    fp_t       vj;
    fp_t       dr;     // Re Y(i,i) V(i)
    fp_t       dj;     // Im Y(i,i) V(i)
  } rowmeta_t;

  rowmeta_t push_meta, pop_meta, meta_s, meta_o;
  logic     row_done;
  logic     meta_valid;

  assign push_meta = '{row: c_sb.row, btype: c_sb.btype, vr: c_sb.vr, vj: c_sb.vj,
                       dr: c_r, dj: c_j};
  assign row_done  = a_v && a_sb.last;

  sync_fifo #(.W($bits(rowmeta_t)), .DEPTH(4)) u_meta (
    .clk, .rst_n,
    .in_valid (c_v && c_sb.diag), .in_ready (),  .in_data (push_meta),
    .out_valid(meta_valid),       .out_ready(row_done), .out_data(pop_meta),
    .count    ()
  );

  // ----------------------------------------------------- lane reduction
  logic p_v, s_v;
  fp_t  p01_r, p23_r, p01_j, p23_j, s_r, s_j;

  fp_addsub u_p01_r (.clk, .rst_n, .in_valid(row_done), .a(buf_r[0]), .b(buf_r[1]), .sub(1'b0), .out_valid(p_v), .y(p01_r));
  fp_addsub u_p23_r (.clk, .rst_n, .in_valid(row_done), .a(buf_r[2]), .b(a_r),      .sub(1'b0), .out_valid(),    .y(p23_r));
  fp_addsub u_p01_j (.clk, .rst_n, .in_valid(row_done), .a(buf_j[0]), .b(buf_j[1]), .sub(1'b0), .out_valid(),    .y(p01_j));
  fp_addsub u_p23_j (.clk, .rst_n, .in_valid(row_done), .a(buf_j[2]), .b(a_j),      .sub(1'b0), .out_valid(),    .y(p23_j));

  fp_addsub u_s_r (.clk, .rst_n, .in_valid(p_v), .a(p01_r), .b(p23_r), .sub(1'b0), .out_valid(s_v), .y(s_r));
  fp_addsub u_s_j (.clk, .rst_n, .in_valid(p_v), .a(p01_j), .b(p23_j), .sub(1'b0), .out_valid(),    .y(s_j));

  delay_line #(.W($bits(rowmeta_t)), .DEPTH(2 * ADD_LAT)) u_meta_s (.clk, .d(pop_meta), .q(meta_s));

  // ------------------------------- remove the diagonal; estimate Q(i)
  logic q_m_v, q_v;
  fp_t  r_o, x_o, r_d, x_d, qm1, qm2, q_o;

  fp_addsub u_r (.clk, .rst_n, .in_valid(s_v), .a(s_r), .b(meta_s.dr), .sub(1'b1), .out_valid(),     .y(r_o));
  fp_addsub u_x (.clk, .rst_n, .in_valid(s_v), .a(s_j), .b(meta_s.dj), .sub(1'b1), .out_valid(),     .y(x_o));

  fp_mul u_qm1 (.clk, .rst_n, .in_valid(s_v), .a(meta_s.vj), .b(s_r), .out_valid(q_m_v), .y(qm1));
  fp_mul u_qm2 (.clk, .rst_n, .in_valid(s_v), .a(meta_s.vr), .b(s_j), .out_valid(),      .y(qm2));
  fp_addsub u_q (.clk, .rst_n, .in_valid(q_m_v), .a(qm1), .b(qm2), .sub(1'b1), .out_valid(q_v), .y(q_o));

  delay_line #(.W(64), .DEPTH(MUL_LAT)) u_rx_d (.clk, .d({r_o, x_o}), .q({r_d, x_d}));
  delay_line #(.W($bits(rowmeta_t)), .DEPTH(MUL_LAT + ADD_LAT)) u_meta_o (.clk, .d(meta_s), .q(meta_o));

  assign out_valid = q_v;
  assign out_data  = '{q_est: q_o, r: r_d, x: x_d, vr: meta_o.vr, vj: meta_o.vj,
                       row: meta_o.row, btype: meta_o.btype};

  // A row can only finish when its diagonal side-band is waiting, and the
  // last slot of a row always falls in lane 3.
  a_meta_ready: assert property (@(posedge clk) disable iff (!rst_n) row_done |-> meta_valid);
  a_last_lane:  assert property (@(posedge clk) disable iff (!rst_n) row_done |-> a_sb.lane == 2'd3);

endmodule
