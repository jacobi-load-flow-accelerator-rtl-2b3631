// tb_workloads: one Jacobi pass over systems shaped like the four benchmark
// systems (118, 300, 1648 and 7917 buses), run through the top at its
// default sizes.
//
// The benchmark network data itself is not available, so each system is
// synthetic: it has the benchmark's bus count and total number of Y-bus
// non-zeros, with row lengths between the benchmark's minimum and maximum
// (one row at the maximum, the rest spread at random). Element values are
// random (diagonal-dominant admittances, voltages near 1 per unit); about a
// quarter of the buses are generators. For every row the result is checked
// against the Jacobi update computed in double precision, and the pass time
// (first row start to last result leaving the result queue) must equal
// sum over rows of ceil(NZ/4)*4 slots, plus the 90-clock pipeline latency,
// minus one. The measured clocks per pass are printed next to the cycle
// estimates of the source design (first iteration / later iterations) for
// comparison; those include host-interface bubbles this testbench does not
// have.
module tb_workloads;
  import jlf_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int LAT_OUT = 2 * MUL_LAT + 5 * ADD_LAT
                         + 1 + MUL_LAT + ADD_LAT + DIV_LAT + ADD_LAT
                         + 1 + 2 * MUL_LAT + 2 * ADD_LAT + DIV_LAT
                         + 1;

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

  // benchmark shapes: buses, total non-zeros, max and min per row, and the
  // source design's cycle estimates (first iteration, later iterations)
  int sys_n[4]     = '{118, 300, 1648, 7917};
  int sys_nz[4]    = '{490, 1118, 6680, 32211};
  int sys_max[4]   = '{13, 13, 24, 16};
  int sys_min[4]   = '{2, 2, 2, 2};
  int sys_first[4] = '{890, 1945, 11223, 55649};
  int sys_other[4] = '{567, 1250, 7828, 39707};

  typedef struct {
    fp_t g[], b[], vr[], vj[];
    bit  gen;
    real p, q, gd, bd;
  } row_s;

  row_s rows[];
  int   len[];

  function automatic real rr(int e_lo, int e_hi);
    return sp_to_real(sp_rand(e_lo, e_hi));
  endfunction

  // double-precision Jacobi update of one row
  function automatic void expect_row(int i, output real nr, output real nj, output real ss);
    real ir = 0, ij = 0, sr, sj, q, den, cr, cj, gd, vr0, vj0, g, b, vr, vj;
    for (int k = 0; k < len[i]; k++) begin
      g = sp_to_real(rows[i].g[k]); b = sp_to_real(rows[i].b[k]);
      vr = sp_to_real(rows[i].vr[k]); vj = sp_to_real(rows[i].vj[k]);
      ir += g * vr - b * vj;
      ij += g * vj + b * vr;
    end
    g = sp_to_real(rows[i].g[0]); b = sp_to_real(rows[i].b[0]);
    vr0 = sp_to_real(rows[i].vr[0]); vj0 = sp_to_real(rows[i].vj[0]);
    sr = ir - (g * vr0 - b * vj0);
    sj = ij - (g * vj0 + b * vr0);
    q  = rows[i].gen ? vj0 * ir - vr0 * ij : rows[i].q;
    den = vr0 * vr0 + vj0 * vj0;
    cr = (rows[i].p * vr0 + q * vj0) / den - sr;
    cj = (rows[i].p * vj0 - q * vr0) / den - sj;
    gd = g * g + b * b;
    nr = (cr * g + cj * b) / gd;
    nj = (cj * g - cr * b) / gd;
    ss = rows[i].gen ? nr * nr + nj * nj : 0.0;
  endfunction

  task automatic make_system(int s);
    int n, extra, i;
    n = sys_n[s];
    rows = new[n];
    len  = new[n];
    foreach (len[i]) len[i] = sys_min[s];
    len[n / 2] = sys_max[s];
    extra = sys_nz[s] - (n - 1) * sys_min[s] - sys_max[s];
    while (extra > 0) begin
      i = $urandom % n;
      if (len[i] < sys_max[s]) begin
        len[i]++;
        extra--;
      end
    end
    for (int r = 0; r < n; r++) begin
      rows[r].g  = new[len[r]];
      rows[r].b  = new[len[r]];
      rows[r].vr = new[len[r]];
      rows[r].vj = new[len[r]];
      rows[r].gen = ($urandom % 4 == 0);
      for (int k = 0; k < len[r]; k++) begin
        // diagonal about len times larger than an off-diagonal entry
        rows[r].g[k]  = k == 0 ? sp_from_real(4.0 * len[r] + rr(126, 127))  : sp_from_real(-rr(126, 127));
        rows[r].b[k]  = k == 0 ? sp_from_real(-12.0 * len[r] - rr(126, 127)) : sp_from_real(rr(128, 129));
        rows[r].vr[k] = sp_from_real(0.9 + 0.2 * rr(126, 126));
        rows[r].vj[k] = sp_from_real(-0.2 * rr(126, 126));
      end
      rows[r].p  = (rows[r].gen ? 1.0 : -1.0) * rr(123, 125);
      rows[r].q  = -rr(122, 124);
      rows[r].gd = sp_to_real(rows[r].g[0]);
      rows[r].bd = sp_to_real(rows[r].b[0]);
    end
  endtask

  task automatic configure(int s);
    for (int r = 0; r < sys_n[s]; r++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_sel = 1'b0; cfg_addr = ROW_W'(r);
      cfg_data = {sp_from_real(rows[r].p), sp_from_real(rows[r].q)};
      @(negedge clk);
      cfg_sel = 1'b1; cfg_data = {rows[r].g[0], rows[r].b[0]};
    end
    @(negedge clk) cfg_we = 1'b0;
  endtask

  longint t_first, t_last;
  int     got;
  bit     run = 1'b0;

  always @(posedge clk) if (run) begin
    if (row_start && t_first < 0) t_first = cyc;
  end

  task automatic one_pass(int s);
    int slots = 0;
    t_first = -1;
    got = 0;
    run = 1'b1;
    fork
      begin
        for (int r = 0; r < sys_n[s]; r++)
          for (int k = 0; k < len[r]; k++) begin
          elem_t e;
          e.g = rows[r].g[k]; e.b = rows[r].b[k]; e.vr = rows[r].vr[k]; e.vj = rows[r].vj[k];
          e.row = ROW_W'(r);
          e.btype = rows[r].gen ? BUS_GEN : BUS_LOAD;
          e.row_len = len_t'(len[r]);
          @(negedge clk);
          in_valid = 1'b1;
          in_elem  = e;
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
        @(negedge clk) in_valid = 1'b0;
      end
      while (got < sys_n[s]) begin
        @(posedge clk);
        if (out_valid) begin
          real nr, nj, ss;
          int  i;
          i = int'(out_result.row);
          expect_row(i, nr, nj, ss);
          checks++;
          if (i != got ||
              !sp_close(out_result.vr, nr, absr(nr) + absr(nj), 1e-4) ||
              !sp_close(out_result.vj, nj, absr(nr) + absr(nj), 1e-4) ||
              (rows[i].gen ? !sp_close(out_result.sumsq, ss, ss, 1e-4) : out_result.sumsq != '0)) begin
            failures++;
            if (failures < 10)
              $display("FAIL system %0d row %0d (expected row %0d): V %g + j%g, expected %g + j%g",
                       sys_n[s], i, got, sp_to_real(out_result.vr), sp_to_real(out_result.vj), nr, nj);
          end
          got++;
          t_last = cyc;
        end
      end
    join
    @(negedge clk) in_valid = 1'b0;
    run = 1'b0;
    foreach (len[r]) slots += ((len[r] + 3) / 4) * 4;
    checks++;
    if (t_last - t_first != slots - 1 + LAT_OUT) begin
      failures++;
      $display("FAIL system %0d: pass took %0d clocks, expected %0d", sys_n[s],
               t_last - t_first, slots - 1 + LAT_OUT);
    end
    $display("%0d buses, %0d non-zeros: %0d slots per iteration, %0d clocks for a first pass (source estimate: later iterations %0d, first %0d)",
             sys_n[s], sys_nz[s], slots, t_last - t_first + 1, sys_other[s], sys_first[s]);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      make_system(s);
      configure(s);
      one_pass(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
