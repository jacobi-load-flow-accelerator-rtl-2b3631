// tb_row_mem: self-checking testbench of the per-bus memory. Writes random
// words to random addresses while reading random addresses, and checks that
// each read returns, one clock later, the last word written there (a read
// and a write of the same address in one clock return the old word), and
// that rd_data holds when rd_en is low.
module tb_row_mem;
  localparam int unsigned W = 64, DEPTH = 100;

  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [$clog2(DEPTH)-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data, model[DEPTH], exp_d;
  int checks = 0, failures = 0;

  row_mem #(.W(W), .DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = i[$clog2(DEPTH)-1:0]; wr_data = {$urandom, $urandom};
      model[i] = wr_data;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      wr_en   = $urandom % 2;
      wr_addr = $clog2(DEPTH)'($urandom % DEPTH);
      wr_data = {$urandom, $urandom};
      rd_en   = $urandom % 4 != 0;
      rd_addr = $clog2(DEPTH)'($urandom % DEPTH);
      if (rd_en) exp_d = model[rd_addr];
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      #1;
      checks++;
      if (rd_data != exp_d) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d got %h exp %h", rd_addr, rd_data, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
