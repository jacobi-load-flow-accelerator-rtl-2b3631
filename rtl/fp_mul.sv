// fp_mul: fully pipelined binary32 multiplier.
//
// y = a * b, rounded to nearest even (see jlf_pkg for the number format).
// One operation is accepted per clock; the result and its valid flag appear
// LATENCY clocks after the operands (default 5, the stage count of the
// multiplier core in the source design). There is no stall input: every
// operation runs through the pipe unchanged.
//
// The product is formed and rounded in the first stage; the remaining
// LATENCY-1 stages are plain registers that a retiming synthesis run
// spreads the logic over. That split is this design's choice.
module fp_mul
  import jlf_pkg::*;
#(
  parameter int unsigned LATENCY = MUL_LAT
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
    pipe[0] <= fp_mul_f(a, b);
    for (int unsigned s = 1; s < LATENCY; s++) pipe[s] <= pipe[s-1];
  end

  assign out_valid = vld[LATENCY-1];
  assign y         = pipe[LATENCY-1];

  initial assert (LATENCY >= 2) else $error("fp_mul: LATENCY must be at least 2");

endmodule
