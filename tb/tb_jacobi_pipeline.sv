// tb_jacobi_pipeline: end-to-end testbench of the load-flow pipeline, run at
// the top's default sizes.
//
// The testbench plays the host: it builds a 10-bus network (bus 0 slack,
// buses 1 and 2 generators, the rest loads; bus 3 has six neighbours, so its
// row has seven non-zeros), loads P/Q and the Y-bus diagonal into the
// pipeline, and then acts as the pipe management unit (queues row packets)
// and the back-end processor (rescales generator voltages to their set
// magnitude from SUMSQ and tests convergence, max |dV| < 1e-4 per unit).
//
// Every result row is checked against the Jacobi update computed in double
// precision from the same input voltages. The solve is run three times:
//   1. Jacobi, host streaming without gaps: also checks that rows start
//      exactly ceil(NZ/4)*4 clocks apart and that the first result leaves the
//      result queue 90 clocks after the first row's last slot;
//   2. Jacobi with random gaps in the host stream (the pipe waits for
//      elements inside a row);
//   3. Gauss-Seidel: the host holds a row back while a neighbour's row is in
//      the pipe and uses each new voltage at once.
// The converged voltages of each run are compared with a double-precision
// Jacobi solution stopped by the same rule (Gauss-Seidel: with the solution
// converged to 1e-9, within 2e-3), and the Jacobi iteration count with the
// double-precision one. A final burst phase queues 200 rows with the result queue
// blocked, so that the input queue fills and the credit limit stops new rows,
// then drains and checks them. Each mechanism (pad slots, rows longer than
// four, generator Q estimate, input gaps, Gauss-Seidel dependency stall,
// credit stall, full input queue) is counted and must have occurred.
module tb_jacobi_pipeline;
  import jlf_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int NB = 10;
  localparam int NE = 14;
  localparam int LAT_OUT = 2 * MUL_LAT + 5 * ADD_LAT            // qest_ip_unit
                         + 1 + MUL_LAT + ADD_LAT + DIV_LAT + ADD_LAT  // sv_unit
                         + 1 + 2 * MUL_LAT + 2 * ADD_LAT + DIV_LAT    // scaling
                         + 1;                                         // result queue

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0, cfg_sel = 1'b0;
  logic [ROW_W-1:0] cfg_addr = '0;
  logic [63:0] cfg_data = '0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  elem_t in_elem = '0;
  result_t out_result;
  logic row_start, pad_slot, credit_stall;

  jacobi_pipeline dut (.clk, .rst_n, .cfg_we, .cfg_sel, .cfg_addr, .cfg_data,
                       .in_valid, .in_ready, .in_elem, .out_valid, .out_ready,
                       .out_result, .row_start, .pad_slot, .credit_stall);

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ the network
  int  fr[NE] = '{0, 0, 1, 2, 3, 3, 3, 3, 4, 5, 6, 7, 8, 1};
  int  to[NE] = '{1, 2, 3, 3, 4, 5, 6, 7, 8, 9, 9, 8, 9, 2};
  real lr[NE] = '{0.02, 0.03, 0.02, 0.025, 0.03, 0.02, 0.035, 0.03, 0.02, 0.025, 0.03, 0.02, 0.03, 0.04};
  real lx[NE] = '{0.06, 0.08, 0.07, 0.075, 0.09, 0.06, 0.1, 0.08, 0.07, 0.08, 0.09, 0.06, 0.1, 0.12};
  real yg[NB][NB], yb[NB][NB];
  real pinj[NB], qinj[NB], vset[NB];
  bit  is_gen[NB];
  int  nbr[NB][$];

  // voltages held by the host
  real vr[NB], vj[NB];

  function automatic void build();
    real d;
    for (int i = 0; i < NB; i++)
      for (int k = 0; k < NB; k++) begin
        yg[i][k] = 0.0;
        yb[i][k] = 0.0;
      end
    for (int e = 0; e < NE; e++) begin
      d = lr[e] * lr[e] + lx[e] * lx[e];
      yg[fr[e]][to[e]] -= lr[e] / d;  yb[fr[e]][to[e]] += lx[e] / d;
      yg[to[e]][fr[e]] -= lr[e] / d;  yb[to[e]][fr[e]] += lx[e] / d;
      yg[fr[e]][fr[e]] += lr[e] / d;  yb[fr[e]][fr[e]] -= lx[e] / d;
      yg[to[e]][to[e]] += lr[e] / d;  yb[to[e]][to[e]] -= lx[e] / d;
      nbr[fr[e]].push_back(to[e]);
      nbr[to[e]].push_back(fr[e]);
    end
    for (int i = 0; i < NB; i++) begin
      is_gen[i] = (i == 1 || i == 2);
      pinj[i]   = is_gen[i] ? 0.5 : -0.15 - 0.02 * i;
      qinj[i]   = is_gen[i] ? 0.0 : -0.05 - 0.01 * i;
      vset[i]   = (i == 0) ? 1.05 : (i == 1) ? 1.03 : (i == 2) ? 1.02 : 1.0;
    end
  endfunction

  function automatic fp_t f(real r);
    return sp_from_real(r);
  endfunction

  // Jacobi update of bus i from voltages (ar, aj), double precision,
  // before the generator magnitude correction.
  function automatic void update(int i, real ar[NB], real aj[NB], output real nr, output real nj);
    real ir, ij, sr, sj, q, den, cr, cj, tr, tj, gd;
    ir = 0; ij = 0;
    for (int k = 0; k < NB; k++) begin
      ir += yg[i][k] * ar[k] - yb[i][k] * aj[k];
      ij += yg[i][k] * aj[k] + yb[i][k] * ar[k];
    end
    sr = ir - (yg[i][i] * ar[i] - yb[i][i] * aj[i]);
    sj = ij - (yg[i][i] * aj[i] + yb[i][i] * ar[i]);
    q  = is_gen[i] ? aj[i] * ir - ar[i] * ij : qinj[i];
    den = ar[i] * ar[i] + aj[i] * aj[i];
    cr = (pinj[i] * ar[i] + q * aj[i]) / den - sr;
    cj = (pinj[i] * aj[i] - q * ar[i]) / den - sj;
    gd = yg[i][i] * yg[i][i] + yb[i][i] * yb[i][i];
    nr = (cr * yg[i][i] + cj * yb[i][i]) / gd;
    nj = (cj * yg[i][i] - cr * yb[i][i]) / gd;
  endfunction

  // -------------------------------------------------------- mechanism counts
  int n_pad = 0, n_long = 0, n_gen = 0, n_gap = 0, n_gs_stall = 0;
  int n_credit = 0, n_inq_full = 0, n_rows_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (pad_slot) n_pad++;
    if (credit_stall) n_credit++;
    if (in_valid && !in_ready) n_inq_full++;
  end

  // ----------------------------------------------------------- host I/O
  bit gaps = 1'b0;

  task automatic push(elem_t e);
    if (gaps) while ($urandom % 4 == 0) begin
      n_gap++;
      @(negedge clk);
      in_valid = 1'b0;
      @(negedge clk);
    end
    in_valid = 1'b1;
    in_elem  = e;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic send_row(int i);
    elem_t e;
    e.row = row_t'(i);
    e.btype = is_gen[i] ? BUS_GEN : BUS_LOAD;
    e.row_len = len_t'(1 + nbr[i].size());
    e.g = f(yg[i][i]); e.b = f(yb[i][i]); e.vr = f(vr[i]); e.vj = f(vj[i]);
    push(e);
    foreach (nbr[i][n]) begin
      int k = nbr[i][n];
      e.g = f(yg[i][k]); e.b = f(yb[i][k]); e.vr = f(vr[k]); e.vj = f(vj[k]);
      push(e);
    end
    if (nbr[i].size() + 1 > 4) n_long++;
    if (is_gen[i]) n_gen++;
  endtask

  // Back-end processing of one result; checks it against the double-precision
  // update from the voltages (er, ej) the row was sent with.
  task automatic backend(result_t r, real er[NB], real ej[NB], output real nr, output real nj);
    real wr, wj, ss, sc;
    int  i;
    i = int'(r.row);
    update(i, er, ej, wr, wj);
    nr = sp_to_real(r.vr);
    nj = sp_to_real(r.vj);
    ss = sp_to_real(r.sumsq);
    checks++;
    if (absr(nr - wr) > 1e-4 || absr(nj - wj) > 1e-4 ||
        (is_gen[i] ? absr(ss - (nr * nr + nj * nj)) > 1e-5 * ss : r.sumsq != '0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL row %0d: vr %g/%g vj %g/%g sumsq %g", i, nr, wr, nj, wj, ss);
    end
    n_rows_out++;
    if (is_gen[i]) begin
      sc = vset[i] / $sqrt(ss);
      nr *= sc;
      nj *= sc;
    end
  endtask

  task automatic get_result(output result_t r);
    out_ready = 1'b1;
    @(posedge clk);
    while (!out_valid) @(posedge clk);
    r = out_result;
    @(negedge clk);
  endtask

  // ---------------------------------------------------------- one solve
  real ref_r[NB], ref_j[NB];   // double-precision Jacobi, same stopping rule
  real sol_r[NB], sol_j[NB];   // converged to 1e-9

  task automatic flat_start();
    for (int i = 0; i < NB; i++) begin
      vr[i] = vset[i];
      vj[i] = 0.0;
    end
  endtask

  task automatic run_solve(bit gauss_seidel, output int iters);
    real    old_r[NB], old_j[NB], nr, nj, dmax;
    result_t r;
    int     sent, got;
    bit     in_pipe[NB];
    flat_start();
    iters = 0;
    do begin
      old_r = vr;
      old_j = vj;
      dmax  = 0.0;
      iters++;
      if (!gauss_seidel) begin
        fork
          for (int i = 1; i < NB; i++) send_row(i);
          for (int n = 1; n < NB; n++) begin
            real nvr, nvj;
            get_result(r);
            backend(r, old_r, old_j, nvr, nvj);
            dmax = (absr(nvr - vr[r.row]) > dmax) ? absr(nvr - vr[r.row]) : dmax;
            dmax = (absr(nvj - vj[r.row]) > dmax) ? absr(nvj - vj[r.row]) : dmax;
            vr[r.row] = nvr;
            vj[r.row] = nvj;
          end
        join
        // Jacobi: sends used the snapshot because results arrive only after
        // all rows are queued; make sure of it.
        if (vr[1] == old_r[1] && iters > 1) begin
          failures++;
          $display("FAIL: generator voltage did not move");
        end
      end else begin
        for (int i = 0; i < NB; i++) in_pipe[i] = 1'b0;
        sent = 1;
        got  = 0;
        while (got < NB - 1) begin
          bit dep = 1'b0;
          if (sent < NB) foreach (nbr[sent][n]) if (in_pipe[nbr[sent][n]]) dep = 1'b1;
          if (sent < NB && !dep) begin
            send_row(sent);
            in_pipe[sent] = 1'b1;
            sent++;
          end else begin
            real cur_r[NB], cur_j[NB];
            if (sent < NB) n_gs_stall++;
            cur_r = vr;
            cur_j = vj;
            get_result(r);
            // the row was sent with the voltages current before its result
            // came back; neighbours were not in the pipe, so cur_* match.
            backend(r, cur_r, cur_j, nr, nj);
            dmax = (absr(nr - vr[r.row]) > dmax) ? absr(nr - vr[r.row]) : dmax;
            dmax = (absr(nj - vj[r.row]) > dmax) ? absr(nj - vj[r.row]) : dmax;
            vr[r.row] = nr;
            vj[r.row] = nj;
            in_pipe[r.row] = 1'b0;
            got++;
          end
        end
      end
    end while (dmax >= 1e-4 && iters < 3000);
    checks++;
    if (dmax >= 1e-4) begin
      failures++;
      $display("FAIL: no convergence");
    end
    for (int i = 0; i < NB; i++) begin
      checks++;
      if (absr(vr[i] - (gauss_seidel ? sol_r[i] : ref_r[i])) > (gauss_seidel ? 2e-3 : 1e-3) ||
          absr(vj[i] - (gauss_seidel ? sol_j[i] : ref_j[i])) > (gauss_seidel ? 2e-3 : 1e-3)) begin
        failures++;
        $display("FAIL bus %0d: V %g + j%g, reference %g + j%g", i, vr[i], vj[i], ref_r[i], ref_j[i]);
      end
    end
  endtask

  // Double-precision Jacobi solution of the same network.
  task automatic reference_solve(input real tol, output int iters);
    real o_r[NB], o_j[NB], nr, nj, dmax, sc;
    flat_start();
    iters = 0;
    do begin
      o_r = vr;
      o_j = vj;
      dmax = 0.0;
      iters++;
      for (int i = 1; i < NB; i++) begin
        update(i, o_r, o_j, nr, nj);
        if (is_gen[i]) begin
          sc = vset[i] / $sqrt(nr * nr + nj * nj);
          nr *= sc;
          nj *= sc;
        end
        dmax = (absr(nr - vr[i]) > dmax) ? absr(nr - vr[i]) : dmax;
        dmax = (absr(nj - vj[i]) > dmax) ? absr(nj - vj[i]) : dmax;
        vr[i] = nr;
        vj[i] = nj;
      end
    end while (dmax >= tol && iters < 30000);
    ref_r = vr;
    ref_j = vj;
  endtask

  // ------------------------------------------------ timing of a clean pass
  longint starts[$];
  longint first_out = -1;
  bit     watch_timing = 1'b0;
  always @(posedge clk) if (rst_n && watch_timing) begin
    if (row_start) starts.push_back(cyc);
    if (out_valid && out_ready && first_out < 0) first_out = cyc;
  end

  function automatic int slots_of(int i);
    return ((nbr[i].size() + 1 + 3) / 4) * 4;
  endfunction

  // ------------------------------------------------------------------ main
  initial begin
    int it_ref, it_j, it_j2, it_gs;
    result_t r;
    build();
    reference_solve(1e-9, it_ref);
    sol_r = ref_r;
    sol_j = ref_j;
    reference_solve(1e-4, it_ref);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NB; i++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_sel = 1'b0; cfg_addr = ROW_W'(i); cfg_data = {f(pinj[i]), f(qinj[i])};
      @(negedge clk);
      cfg_we = 1'b1; cfg_sel = 1'b1; cfg_addr = ROW_W'(i); cfg_data = {f(yg[i][i]), f(yb[i][i])};
    end
    @(negedge clk) cfg_we = 1'b0;

    // timing of one clean Jacobi pass (the first iteration of run 1)
    watch_timing = 1'b1;
    gaps = 1'b0;
    run_solve(1'b0, it_j);
    watch_timing = 1'b0;
    for (int n = 1; n < NB - 1; n++) begin
      checks++;
      if (starts[n] - starts[n-1] != slots_of(n)) begin
        failures++;
        $display("FAIL: row %0d started %0d clocks after row %0d, expected %0d",
                 n + 1, starts[n] - starts[n-1], n, slots_of(n));
      end
    end
    checks++;
    if (first_out - starts[0] != slots_of(1) - 1 + LAT_OUT) begin
      failures++;
      $display("FAIL: first result after %0d clocks, expected %0d",
               first_out - starts[0], slots_of(1) - 1 + LAT_OUT);
    end

    gaps = 1'b1;
    run_solve(1'b0, it_j2);
    gaps = 1'b0;
    run_solve(1'b1, it_gs);
    checks++;
    if (it_j < it_ref - 2 || it_j > it_ref + 2) begin
      failures++;
      $display("FAIL: pipeline Jacobi took %0d iterations, double-precision Jacobi %0d", it_j, it_ref);
    end
    $display("iterations: reference Jacobi %0d, pipeline Jacobi %0d and %0d, Gauss-Seidel %0d",
             it_ref, it_j, it_j2, it_gs);

    // burst: 100 rows with the result queue blocked
    begin
      real o_r[NB], o_j[NB], nr, nj;
      flat_start();
      o_r = vr;
      o_j = vj;
      out_ready = 1'b0;
      fork
        for (int n = 0; n < 200; n++) send_row(1 + n % (NB - 1));
        begin
          repeat (3000) @(negedge clk);
          checks++;
          if (dut.u_out_q.count != 7'(64)) begin
            failures++;
            $display("FAIL: result queue holds %0d rows, expected 64", dut.u_out_q.count);
          end
          for (int n = 0; n < 200; n++) begin
            get_result(r);
            backend(r, o_r, o_j, nr, nj);
          end
        end
      join
    end

    checks++;
    if (n_pad == 0 || n_long == 0 || n_gen == 0 || n_gap == 0 || n_gs_stall == 0 ||
        n_credit == 0 || n_inq_full == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("pad slots %0d, long rows %0d, generator rows %0d, input gaps %0d, GS stalls %0d, credit-stall clocks %0d, input-queue-full clocks %0d, results %0d",
             n_pad, n_long, n_gen, n_gap, n_gs_stall, n_credit, n_inq_full, n_rows_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
