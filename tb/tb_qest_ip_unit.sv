// tb_qest_ip_unit: self-checking testbench of the Q-estimator / inner-product
// unit. Random rows of 1..13 elements (diagonal first), load and generator
// buses, are sent through the unit. For every row the testbench checks, with
// double-precision reference arithmetic,
//   R + jX = sum_{k>0} Y(k) V(k),  Q = Vj(0) Re I - Vr(0) Im I  (I over all k),
// the passed-down V(i), row index and bus type, and (in the back-to-back
// phase) the exact cycle of the result: 30 clocks after the row's last slot,
// with ceil(n/4)*4 slots per row. A second phase starves the input and drops
// row_ok at random to check that rows never start without row_ok and that
// gaps inside a row do not disturb the sums.
module tb_qest_ip_unit;
  import jlf_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int unsigned LAT = 2 * MUL_LAT + 5 * ADD_LAT;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    in_valid = 1'b0, in_ready, row_ok = 1'b1, row_start, pad_slot, out_valid;
  elem_t   in_elem = '0;
  ip_out_t out_data;
  int      checks = 0, failures = 0;
  longint  cyc = 0;
  int      n_rows = 0, n_long = 0, n_pads = 0, exp_pads = 0, n_gen = 0;
  bit      timing_on = 1'b1;

  typedef struct {
    real r, x, q, scale_ri, scale_q;
    fp_t vr, vj;
    row_t row;
    bus_type_e bt;
    int  slots;
  } exp_t;
  exp_t   q[$];
  longint due[$];

  qest_ip_unit dut (.clk, .rst_n, .in_valid, .in_ready, .in_elem, .row_ok,
                    .row_start, .pad_slot, .out_valid, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // row start times: result due start + slots - 1 + LAT
  int slots_q[$];
  always @(posedge clk) if (rst_n) begin
    if (row_start) begin
      if (!row_ok) begin
        failures++;
        $display("FAIL: row started while row_ok low");
      end
      due.push_back(cyc + slots_q.pop_front() - 1 + LAT);
    end
    if (pad_slot) n_pads++;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    longint d;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output");
    end else begin
      e = q.pop_front();
      d = due.pop_front();
      if (!sp_close(out_data.r, e.r, e.scale_ri, 1e-5) ||
          !sp_close(out_data.x, e.x, e.scale_ri, 1e-5) ||
          !sp_close(out_data.q_est, e.q, e.scale_q, 1e-5) ||
          out_data.vr !== e.vr || out_data.vj !== e.vj ||
          out_data.row !== e.row || out_data.btype !== e.bt ||
          (timing_on && cyc != d)) begin
        failures++;
        if (failures < 10)
          $display("FAIL row %0d: r %g/%g x %g/%g q %g/%g cyc %0d due %0d",
                   e.row, sp_to_real(out_data.r), e.r, sp_to_real(out_data.x), e.x,
                   sp_to_real(out_data.q_est), e.q, cyc, d);
      end
    end
  end

  task automatic send_row(int n, bit gaps);
    elem_t el[];
    exp_t  e;
    real   ir = 0, ij = 0, sr = 0, sj = 0, ar = 0, aj = 0;
    real   g, b, vr, vj;
    el = new[n];
    e.row = row_t'($urandom % MAX_BUSES);
    e.bt  = bus_type_e'($urandom % 2);
    for (int k = 0; k < n; k++) begin
      el[k].g  = sp_rand(120, 130);
      el[k].b  = sp_rand(120, 130);
      el[k].vr = sp_rand(124, 127);
      el[k].vj = sp_rand(118, 125);
      el[k].row = e.row;
      el[k].btype = e.bt;
      el[k].row_len = len_t'(n);
      g = sp_to_real(el[k].g); b = sp_to_real(el[k].b);
      vr = sp_to_real(el[k].vr); vj = sp_to_real(el[k].vj);
      ir += g * vr - b * vj;
      ij += g * vj + b * vr;
      ar += absr(g * vr) + absr(b * vj) + absr(g * vj) + absr(b * vr);
      if (k > 0) begin
        sr += g * vr - b * vj;
        sj += g * vj + b * vr;
      end
    end
    e.vr = el[0].vr; e.vj = el[0].vj;
    e.r = sr; e.x = sj;
    vr = sp_to_real(e.vr); vj = sp_to_real(e.vj);
    e.q = vj * ir - vr * ij;
    e.scale_ri = ar;
    e.scale_q  = ar * (absr(vr) + absr(vj)) + absr(vj * ir) + absr(vr * ij);
    e.slots = ((n + 3) / 4) * 4;
    exp_pads += e.slots - n;
    if (n > 4) n_long++;
    if (e.bt == BUS_GEN) n_gen++;
    n_rows++;
    q.push_back(e);
    slots_q.push_back(e.slots);
    for (int k = 0; k < n; k++) begin
      if (gaps) while ($urandom % 3 == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_elem  = el[k];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // phase 1: back-to-back elements, exact timing
    for (int r = 0; r < 400; r++) send_row(1 + $urandom % 13, 1'b0);
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 60) @(negedge clk);
    if (n_pads != exp_pads) begin
      failures++;
      $display("FAIL: %0d pad slots, expected %0d", n_pads, exp_pads);
    end
    checks++;
    // phase 2: gaps in the input and random row_ok
    timing_on = 1'b0;
    fork
      begin
        for (int r = 0; r < 300; r++) send_row(1 + $urandom % 13, 1'b1);
        @(negedge clk) in_valid = 1'b0;
      end
      begin
        repeat (6000) begin
          @(negedge clk);
          row_ok = ($urandom % 4 != 0);
        end
        row_ok = 1'b1;
      end
    join_any
    row_ok = 1'b1;
    repeat (LAT + 60) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d rows missing", q.size());
    end
    $display("rows=%0d long_rows=%0d generator_rows=%0d pads=%0d", n_rows, n_long, n_gen, n_pads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
