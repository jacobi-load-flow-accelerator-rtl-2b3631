// row_mem: pre-configured per-bus memory keyed by row index.
//
// Before a solve the host loads one word per bus: the real and reactive
// power injections {P(i), Q(i)} for the S/V unit, or the Y-bus diagonal
// {G(i,i), B(i,i)} for the scaling unit. During the solve the pipeline reads
// it by the row index that travels with each row. Simple dual-port RAM (one
// write port for configuration, one read port), read data registered: rd_data
// is valid one clock after rd_en. The memory maps onto embedded dual-port
// block RAM; depth defaults to the 100,000-bus capacity the design targets.
module row_mem #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = jlf_pkg::MAX_BUSES
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [W-1:0]             wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
