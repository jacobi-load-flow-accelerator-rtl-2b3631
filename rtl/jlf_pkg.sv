// jlf_pkg: types, sizes and floating-point arithmetic shared by the Jacobi
// load-flow pipeline.
//
// Numbers are IEEE-754 binary32 words (fp_t). The arithmetic functions below
// are the combinational kernels of the three pipelined cores (fp_mul,
// fp_addsub, fp_div). They round to nearest, ties to even, flush subnormal
// inputs and results to signed zero, turn exponent overflow into a signed
// infinity and treat any all-ones exponent as an infinity (no NaN payloads).
// The number format is this design's choice: the source design names
// floating-point cores but not their precision.
//
// The pipeline carries one Y-bus row at a time. A row travels as a packet of
// elements (elem_t): the diagonal entry Y(i,i) with the row's own voltage
// V(i) first, then each off-diagonal entry Y(i,k) with the voltage V(k) of the
// neighbour bus. Every element repeats the row index, bus type and row length.
package jlf_pkg;

  typedef logic [31:0] fp_t;

  // Largest system the on-chip row memories hold ("in the neighbourhood of
  // 100,000 buses").
  localparam int unsigned MAX_BUSES = 100000;
  localparam int unsigned ROW_W     = $clog2(MAX_BUSES);
  // Row length field: number of non-zero Y-bus entries in the row.
  localparam int unsigned LEN_W     = 8;
  // Elements per row slot; matches the 4-entry partial-sum buffer and the
  // 4-stage adder of the inner-product accumulator.
  localparam int unsigned LANES     = 4;

  // Latencies of the floating-point cores (synthesis results on Stratix).
  localparam int unsigned MUL_LAT = 5;
  localparam int unsigned ADD_LAT = 4;
  localparam int unsigned DIV_LAT = 13;

  typedef logic [ROW_W-1:0] row_t;
  typedef logic [LEN_W-1:0] len_t;

  typedef enum logic {BUS_LOAD = 1'b0, BUS_GEN = 1'b1} bus_type_e;

  // One Y-bus element of a row packet, as queued by the host.
  typedef struct packed {
    fp_t       g;        // Re Y(i,k)
    fp_t       b;        // Im Y(i,k)
    fp_t       vr;       // Re V(k)
    fp_t       vj;       // Im V(k)
    row_t      row;      // i
    bus_type_e btype;    // type of bus i
    len_t      row_len;  // non-zeros in row i (packet size)
  } elem_t;

  // Q-estimator / inner-product unit -> S/V unit.
  typedef struct packed {
    fp_t       q_est;    // estimated reactive injection of bus i
    fp_t       r;        // Re sum_{k!=i} Y(i,k) V(k)
    fp_t       x;        // Im sum_{k!=i} Y(i,k) V(k)
    fp_t       vr;       // Re V(i) (previous iterate)
    fp_t       vj;       // Im V(i)
    row_t      row;
    bus_type_e btype;
  } ip_out_t;

  // S/V unit -> Y-bus scaling unit.
  typedef struct packed {
    fp_t       r;        // Re [ (S/V)* - inner product ]
    fp_t       x;        // Im [ (S/V)* - inner product ]
    row_t      row;
    bus_type_e btype;
  } sv_out_t;

  // Y-bus scaling unit -> result queue -> host.
  typedef struct packed {
    fp_t  vr;            // Re V(i), new iterate
    fp_t  vj;            // Im V(i), new iterate
    fp_t  sumsq;         // vr^2 + vj^2 for generator buses, 0 for load buses
    row_t row;
  } result_t;

  localparam fp_t FP_ZERO = 32'h0000_0000;

  function automatic logic fp_is_zero(input fp_t a);
    return a[30:23] == 8'd0;
  endfunction

  function automatic logic fp_is_inf(input fp_t a);
    return a[30:23] == 8'hFF;
  endfunction

  // Round a 24-bit significand (leading one at bit 23) with guard and sticky
  // bits, then pack it with the biased exponent e.
  function automatic fp_t fp_round_pack(input logic s, input logic signed [11:0] e,
                                        input logic [23:0] m, input logic g,
                                        input logic st);
    logic [24:0] mr;
    logic signed [11:0] er;
    mr = {1'b0, m} + {24'd0, (g && (st || m[0]))};
    er = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 12'sd1;
    end
    if (er >= 12'sd255) return {s, 8'hFF, 23'd0};
    if (er <= 12'sd0)   return {s, 31'd0};
    return {s, er[7:0], mr[22:0]};
  endfunction

  function automatic fp_t fp_mul_f(input fp_t a, input fp_t b);
    logic s;
    logic [47:0] p;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (fp_is_inf(a) || fp_is_inf(b)) return {s, 8'hFF, 23'd0};
    if (fp_is_zero(a) || fp_is_zero(b)) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = $signed({4'd0, a[30:23]}) + $signed({4'd0, b[30:23]}) - 12'sd127;
    if (p[47]) return fp_round_pack(s, e + 12'sd1, p[47:24], p[23], |p[22:0]);
    return fp_round_pack(s, e, p[46:23], p[22], |p[21:0]);
  endfunction

  // a + b, or a - b when sub is set.
  function automatic fp_t fp_add_f(input fp_t a, input fp_t b_in, input logic sub);
    fp_t b, hi_op, lo_op;
    logic [50:0] mx, my, sum;
    logic [49:0] sh;
    logic [7:0]  d;
    logic        lost;
    int          lz;
    logic signed [11:0] e;
    b = {b_in[31] ^ sub, b_in[30:0]};
    if (fp_is_inf(a)) return {a[31], 8'hFF, 23'd0};
    if (fp_is_inf(b)) return {b[31], 8'hFF, 23'd0};
    if (fp_is_zero(a) && fp_is_zero(b)) return {a[31] & b[31], 31'd0};
    if (fp_is_zero(a)) return b;
    if (fp_is_zero(b)) return a;
    if (a[30:0] >= b[30:0]) begin
      hi_op = a; lo_op = b;
    end else begin
      hi_op = b; lo_op = a;
    end
    d  = hi_op[30:23] - lo_op[30:23];
    mx = {1'b0, 1'b1, hi_op[22:0], 26'd0};
    sh = {1'b1, lo_op[22:0], 26'd0};
    lost = 1'b0;
    if (d >= 8'd50) begin
      lost = 1'b1;
      sh   = '0;
    end else begin
      lost = |(sh & ~({50{1'b1}} << d));
      sh   = sh >> d;
    end
    my = {1'b0, sh[49:1], sh[0] | lost};
    if (hi_op[31] == lo_op[31]) sum = mx + my;
    else                      sum = mx - my;
    if (sum == '0) return 32'd0;
    lz = 0;
    for (int k = 0; k <= 50; k++)
      if (sum[k]) lz = 50 - k;
    sum = sum << lz;
    e = $signed({4'd0, hi_op[30:23]}) + 12'sd1 - 12'(lz);
    return fp_round_pack(hi_op[31], e, sum[50:27], sum[26], |sum[25:0]);
  endfunction

  function automatic fp_t fp_div_f(input fp_t a, input fp_t b);
    logic s;
    logic [49:0] num, q, rem;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (fp_is_inf(a) || fp_is_zero(b)) return {s, 8'hFF, 23'd0};
    if (fp_is_zero(a) || fp_is_inf(b)) return {s, 31'd0};
    num = {1'b1, a[22:0], 26'd0};
    q   = num / {26'd0, 1'b1, b[22:0]};
    rem = num % {26'd0, 1'b1, b[22:0]};
    e = $signed({4'd0, a[30:23]}) - $signed({4'd0, b[30:23]}) + 12'sd127;
    if (q[26]) return fp_round_pack(s, e, q[26:3], q[2], |q[1:0] || rem != '0);
    return fp_round_pack(s, e - 12'sd1, q[25:2], q[1], q[0] || rem != '0);
  endfunction

endpackage
