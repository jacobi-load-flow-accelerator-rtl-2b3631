// fp_addsub: fully pipelined binary32 adder/subtractor.
//
// y = a + b, or a - b when sub is high, rounded to nearest even (see jlf_pkg
// for the number format). One operation per clock; the result appears
// LATENCY clocks later (default 4, the stage count of the add/subtract core in
// the source design). No stall input.
//
// Alignment, add, normalisation and rounding happen in the first stage; the
// remaining LATENCY-1 stages are registers for retiming (this design's
// choice).
module fp_addsub
  import jlf_pkg::*;
#(
  parameter int unsigned LATENCY = ADD_LAT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fp_t  a,
  input  fp_t  b,
  input  logic sub,
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
    pipe[0] <= fp_add_f(a, b, sub);
    for (int unsigned s = 1; s < LATENCY; s++) pipe[s] <= pipe[s-1];
  end

  assign out_valid = vld[LATENCY-1];
  assign y         = pipe[LATENCY-1];

  initial assert (LATENCY >= 2) else $error("fp_addsub: LATENCY must be at least 2");

endmodule
