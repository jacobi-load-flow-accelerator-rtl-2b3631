// tb_fp_mul: self-checking testbench of fp_mul.
// Streams random operations into the core, some clocks with in_valid low, and
// compares every result bit-exactly with the double-precision reference
// rounded to single (tb_fp_ref_pkg). Also checks that each result appears
// exactly LATENCY = 5 clocks after its operands, and covers zero operands, overflow.
module tb_fp_mul;
  import jlf_pkg::*;
  import tb_fp_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  fp_t  a = '0, b = '0;
  logic sub = 1'b0;
  logic out_valid;
  fp_t  y;
  int   checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct { fp_t exp; longint due; fp_t a; fp_t b; logic sub; } exp_t;
  exp_t q[$];

  fp_mul dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected result %h", y);
    end else begin
      e = q.pop_front();
      if (y !== e.exp || cyc != e.due) begin
        failures++;
        if (failures < 10)
          $display("FAIL: a=%h b=%h sub=%0d got %h exp %h at cycle %0d due %0d",
                   e.a, e.b, e.sub, y, e.exp, cyc, e.due);
      end
    end
  end

  function automatic fp_t ref_op(fp_t x, fp_t z, logic s);
    real rx, rz;
    rx = sp_to_real(x);
    rz = sp_to_real(z);
    return sp_from_real(rx * rz);
  endfunction

  task automatic drive(fp_t x, fp_t z, logic s);
    @(negedge clk);
    in_valid = 1'b1;
    a = x; b = z; sub = s;
    q.push_back('{exp: ref_op(x, z, s), due: cyc + 5, a: x, b: z, sub: s});
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed cases
    drive(32'h3F80_0000, 32'h4000_0000, 1'b0);   // 1, 2
    drive(32'h0000_0000, 32'h4040_0000, 1'b0);   // 0, 3
    drive(32'h4040_0000, 32'h0000_0000, 1'b1);   // 3, 0
    drive(32'hC0A0_0000, 32'h3E80_0000, 1'b1);   // -5, 0.25
    drive(32'h3FC0_0000, 32'h3FC0_0000, 1'b1);   // 1.5, 1.5
    drive(32'h3F80_0001, 32'h3F7F_FFFF, 1'b0);
    drive(32'h7F00_0000, 32'h4100_0000, 1'b0);   // overflow to infinity
    idle();
    for (int n = 0; n < 20000; n++) begin
      if ($urandom % 8 == 0) idle();
      else drive(sp_rand(80, 170), sp_rand(80, 170), 1'($urandom));
    end
    idle();
    repeat (5 + 5) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
