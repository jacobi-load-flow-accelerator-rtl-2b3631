// tb_sync_fifo: self-checking testbench of the queue. Random pushes and pops
// (including while full and while empty) against a reference queue; checks
// the data order, in_ready/out_valid flags and the fill count every clock,
// and that the full and empty conditions both occurred.
module tb_sync_fifo;
  localparam int unsigned W = 16, DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b0, in_ready, out_valid;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                         .out_valid, .out_ready, .out_data, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      // phases that favour filling, then draining
      in_valid  = ($urandom % 8) < (((n / 500) % 2) ? 2 : 6);
      out_ready = ($urandom % 8) < (((n / 500) % 2) ? 6 : 2);
      in_data   = W'($urandom);
      #1;
      checks++;
      if (in_ready != (model.size() < DEPTH) || out_valid != (model.size() > 0) ||
          int'(count) != model.size() || (out_valid && out_data != model[0])) begin
        failures++;
        if (failures < 10)
          $display("FAIL: size %0d count %0d in_ready %0d out_valid %0d data %h exp %h",
                   model.size(), count, in_ready, out_valid, out_data,
                   model.size() ? model[0] : '0);
      end
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL: full %0d empty %0d", n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
