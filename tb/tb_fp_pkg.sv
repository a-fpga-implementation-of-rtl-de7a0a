// tb_fp_pkg: reference conversions between simulator reals and IEEE-754
// single precision words, used by the testbenches to work out expected
// values independently of the hardware's floating point unit.
// to_single rounds to nearest even and flushes subnormal results to zero,
// like the hardware; to_real is exact.
//
// The document fixes only the number format; the rounding and flushing rules
// mirror this design's fp_unit.
package tb_fp_pkg;

  function automatic real to_real(logic [31:0] v);
    logic [63:0] d;
    if (v[30:23] == 8'd0) return 0.0;
    d = {v[31], 11'(int'(v[30:23]) - 127 + 1023), v[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_single(real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    logic        inc;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    inc = d[28] && ((d[27:0] != 28'd0) || m[0]);
    m = m + 25'(inc);
    if (m[24]) begin
      m = m >> 1;
      e++;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Uniform random real in [lo, hi).
  function automatic real rand_real(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom % 1000000) / 1000000.0);
  endfunction

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

endpackage
