// tb_fp_ref_pkg: reference binary32 arithmetic for the testbenches, built on
// the simulator's double-precision real type. An operation done in double
// and rounded once to single gives the correctly rounded single result for
// +, -, * and / (double carries more than 2*24+2 significand bits), so
// sp_from_real(a op b) is an independent model of the cores. Subnormals are
// flushed to zero to match the design.
package tb_fp_ref_pkg;

  function automatic real sp_to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] sp_from_real(input real r);
    logic [63:0] d;
    logic        s, g, st;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    s = d[63];
    if (d[62:0] == '0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  // Random normal number with biased exponent in [elo, ehi].
  function automatic logic [31:0] sp_rand(input int elo, input int ehi);
    int unsigned e;
    e = elo + ($urandom % (ehi - elo + 1));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  function automatic real absr(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // True when the single-precision result got is within rel*scale of the
  // exact value want; scale is the magnitude of the largest term that went
  // into want, so cancellation does not tighten the bound.
  function automatic logic sp_close(input logic [31:0] got, input real want,
                                    input real scale, input real rel);
    return absr(sp_to_real(got) - want) <= rel * scale + 1.0e-30;
  endfunction

endpackage
