// delay_line: fixed-latency shift register that carries side-band data (row
// index, bus type, operands needed later) alongside the floating-point cores,
// so that it reaches a later stage in the same clock as the arithmetic result
// it belongs to. DEPTH clocks of latency, one word per clock, no stall.
// DEPTH = 0 is a plain wire.
module delay_line #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int unsigned s = 1; s < DEPTH; s++) sr[s] <= sr[s-1];
    end
    assign q = sr[DEPTH-1];
  end

endmodule
