// tb_ybus_scale_unit: self-checking testbench of the Y-bus scaling unit.
// Loads {G(i,i), B(i,i)} into a small memory (DEPTH = 64), streams random
// rows (random valid) and checks against double-precision reference
// arithmetic V = (R + jX)/(G + jB), SUMSQ = |V|^2 for generator buses and 0
// for load buses, the row index and the 32-clock latency.
module tb_ybus_scale_unit;
  import jlf_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int unsigned DEPTH = 64;
  localparam int unsigned LAT   = 1 + 2 * MUL_LAT + 2 * ADD_LAT + DIV_LAT;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    in_valid = 1'b0, cfg_we = 1'b0, out_valid;
  sv_out_t in_data = '0;
  logic [$clog2(DEPTH)-1:0] cfg_addr = '0;
  logic [63:0] cfg_data = '0;
  result_t out_data;
  int      checks = 0, failures = 0;
  longint  cyc = 0;
  fp_t     gm[DEPTH], bm[DEPTH];

  typedef struct { real vr, vj, ss; row_t row; bit gen; longint due; } exp_t;
  exp_t q[$];

  ybus_scale_unit #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .in_data, .cfg_we,
                                        .cfg_addr, .cfg_data, .out_valid, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    logic ok;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output");
    end else begin
      e = q.pop_front();
      ok = sp_close(out_data.vr, e.vr, absr(e.vr) + absr(e.vj), 1e-5) &&
           sp_close(out_data.vj, e.vj, absr(e.vr) + absr(e.vj), 1e-5) &&
           (e.gen ? sp_close(out_data.sumsq, e.ss, e.ss, 1e-5) : out_data.sumsq == '0) &&
           out_data.row == e.row && cyc == e.due;
      if (!ok) begin
        failures++;
        if (failures < 10)
          $display("FAIL row %0d: vr %g/%g vj %g/%g ss %g/%g cyc %0d due %0d", e.row,
                   sp_to_real(out_data.vr), e.vr, sp_to_real(out_data.vj), e.vj,
                   sp_to_real(out_data.sumsq), e.ss, cyc, e.due);
      end
    end
  end

  initial begin
    sv_out_t d;
    exp_t e;
    real g, b, r, x, den;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      gm[i] = sp_rand(125, 131);
      bm[i] = sp_rand(125, 133);
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = i[$clog2(DEPTH)-1:0]; cfg_data = {gm[i], bm[i]};
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
      d.r     = sp_rand(122, 130);
      d.x     = sp_rand(122, 130);
      in_valid = 1'b1;
      in_data  = d;
      g = sp_to_real(gm[d.row]); b = sp_to_real(bm[d.row]);
      r = sp_to_real(d.r); x = sp_to_real(d.x);
      den = g * g + b * b;
      e.vr = (r * g + x * b) / den;
      e.vj = (x * g - r * b) / den;
      e.ss = e.vr * e.vr + e.vj * e.vj;
      e.gen = (d.btype == BUS_GEN);
      e.row = d.row;
      e.due = cyc + LAT;
      q.push_back(e);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 5) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d rows missing", q.size());
    end
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
