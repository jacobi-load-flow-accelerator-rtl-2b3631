// tb_sv_unit: self-checking testbench of the S/V unit. Loads {P, Q} for a
// small memory (DEPTH = 64), then streams random rows (random valid) with
// load and generator bus types and checks, against double-precision
// reference arithmetic,
//   R' + jX' = (P - jQ)/(Vr - jVj) - (R + jX),
// with Q taken from memory for load buses and from q_est for generator
// buses, the row/type side-band, and the 27-clock latency.
module tb_sv_unit;
  import jlf_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int unsigned DEPTH = 64;
  localparam int unsigned LAT   = 1 + MUL_LAT + ADD_LAT + DIV_LAT + ADD_LAT;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    in_valid = 1'b0, cfg_we = 1'b0, out_valid;
  ip_out_t in_data = '0;
  logic [$clog2(DEPTH)-1:0] cfg_addr = '0;
  logic [63:0] cfg_data = '0;
  sv_out_t out_data;
  int      checks = 0, failures = 0, n_gen = 0, n_load = 0;
  longint  cyc = 0;
  fp_t     pm[DEPTH], qm[DEPTH];

  typedef struct { real r, x, sc; row_t row; bus_type_e bt; longint due; } exp_t;
  exp_t q[$];

  sv_unit #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .in_data, .cfg_we, .cfg_addr,
                                .cfg_data, .out_valid, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output");
    end else begin
      e = q.pop_front();
      if (!sp_close(out_data.r, e.r, e.sc, 1e-5) || !sp_close(out_data.x, e.x, e.sc, 1e-5) ||
          out_data.row !== e.row || out_data.btype !== e.bt || cyc != e.due) begin
        failures++;
        if (failures < 10)
          $display("FAIL row %0d: r %g/%g x %g/%g cyc %0d due %0d", e.row,
                   sp_to_real(out_data.r), e.r, sp_to_real(out_data.x), e.x, cyc, e.due);
      end
    end
  end

  initial begin
    ip_out_t d;
    exp_t e;
    real p, qq, vr, vj, den, cr, cj;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      pm[i] = sp_rand(120, 128);
      qm[i] = sp_rand(120, 128);
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = i[$clog2(DEPTH)-1:0]; cfg_data = {pm[i], qm[i]};
    end
    @(negedge clk) cfg_we = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if ($urandom % 5 == 0) begin
        in_valid = 1'b0;
        continue;
      end
      d.row   = row_t'($urandom % DEPTH);
      d.btype = bus_type_e'($urandom % 2);
      d.q_est = sp_rand(120, 128);
      d.r     = sp_rand(120, 130);
      d.x     = sp_rand(120, 130);
      d.vr    = sp_rand(125, 127);
      d.vj    = sp_rand(118, 124);
      in_valid = 1'b1;
      in_data  = d;
      p  = sp_to_real(pm[d.row]);
      qq = (d.btype == BUS_GEN) ? sp_to_real(d.q_est) : sp_to_real(qm[d.row]);
      if (d.btype == BUS_GEN) n_gen++; else n_load++;
      vr = sp_to_real(d.vr); vj = sp_to_real(d.vj);
      den = vr * vr + vj * vj;
      cr = (p * vr + qq * vj) / den;
      cj = (p * vj - qq * vr) / den;
      e.r = cr - sp_to_real(d.r);
      e.x = cj - sp_to_real(d.x);
      e.sc = (absr(p) + absr(qq)) * (absr(vr) + absr(vj)) / den + absr(sp_to_real(d.r)) + absr(sp_to_real(d.x));
      e.row = d.row; e.bt = d.btype;
      e.due = cyc + LAT;
      q.push_back(e);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 5) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d rows missing", q.size());
    end
    $display("generator rows=%0d load rows=%0d", n_gen, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
