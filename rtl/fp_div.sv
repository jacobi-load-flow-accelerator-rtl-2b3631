// fp_div: fully pipelined binary32 divider.
//
// y = a / b, rounded to nearest even (see jlf_pkg for the number format;
// a zero divisor gives a signed infinity). One operation per clock; the
// quotient appears LATENCY clocks later (default 13, the stage count of the
// divider core in the source design). No stall input.
//
// The quotient is formed and rounded in the first stage; the remaining
// LATENCY-1 stages are registers for retiming (this design's choice).
module fp_div
  import jlf_pkg::*;
#(
  parameter int unsigned LATENCY = DIV_LAT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fp_t  a,
  input  fp_t  b,

  output logic out_valid,
  output fp_t  y
);

  logic [LATENCY-1:0] vld;
  fp_t                pipe [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    pipe[0] <= fp_div_f(a, b);
    for (int unsigned s = 1; s < LATENCY; s++) pipe[s] <= pipe[s-1];
  end

  assign out_valid = vld[LATENCY-1];
  assign y         = pipe[LATENCY-1];

  initial assert (LATENCY >= 2) else $error("fp_div: LATENCY must be at least 2");

endmodule
