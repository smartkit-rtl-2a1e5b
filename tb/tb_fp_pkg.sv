// tb_fp_pkg: reference conversions between IEEE single-precision bit
// patterns and real numbers, written independently of the RTL, plus a
// relative-error comparison used by the floating point testbenches.
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] v);
    logic [10:0] e;
    if (v[30:23] == 8'd0) return 0.0;
    e = 11'(v[30:23]) - 11'd127 + 11'd1023;
    return $bitstoreal({v[31], e, v[22:0], 29'd0});
  endfunction

  // real -> single, truncating the double's mantissa
  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    int          e;
    d = $realtobits(r);
    if (r == 0.0) return 32'd0;
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  function automatic real rabs(real r);
    return r < 0.0 ? -r : r;
  endfunction

  // |got - want| <= tol * max(|want|, floor)
  function automatic bit close(real got, real want, real tol, real floor_ = 1e-30);
    real s;
    s = rabs(want) > floor_ ? rabs(want) : floor_;
    return rabs(got - want) <= tol * s;
  endfunction

endpackage
