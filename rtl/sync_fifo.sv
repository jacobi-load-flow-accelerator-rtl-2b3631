// sync_fifo: the queues at both ends of the FPGA pipeline.
//
// The host deposits row-packet elements into the input queue, which the
// pipeline reads when data is marked ready (wr/rd valid-ready handshakes);
// finished rows are queued in the result queue until the host retrieves them.
// The source design names these queues but not their size or protocol: this
// is a first-word-fall-through FIFO of DEPTH words (DEPTH a power of two),
// with valid/ready on both sides. A write is taken when in_valid && in_ready,
// a read when out_valid && out_ready; both may happen in the same clock.
// count gives the current fill level.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [W-1:0]             in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [W-1:0]             out_data,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          push, pop;

  assign count     = wptr - rptr;
  assign in_ready  = count != (AW+1)'(DEPTH);
  assign out_valid = count != '0;
  assign out_data  = mem[rptr[AW-1:0]];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wptr[AW-1:0]] <= in_data;

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("sync_fifo: DEPTH must be a power of two");

  // Handshake rules: never write when full, never read when empty.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  in_valid && !in_ready |-> !push);
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  count <= (AW+1)'(DEPTH));

endmodule
