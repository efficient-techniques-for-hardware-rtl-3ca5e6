// fp_ref_pkg: reference helpers for the floating-point testbenches. They
// work through the simulator's double-precision arithmetic: a value that
// is exact in double is cut to single precision by truncating its
// fraction (round toward zero), flushing results below the single normal
// range to zero and sending those above it to infinity.
package fp_ref_pkg;
  function automatic logic [31:0] trunc_single(real v);
    logic [63:0] b;
    int e;
    b = $realtobits(v);
    if (b[62:0] == '0) return {b[63], 31'd0};
    e = int'(b[62:52]) - 1023 + 127;
    if (e <= 0)   return {b[63], 31'd0};
    if (e >= 255) return {b[63], 8'hFF, 23'd0};
    return {b[63], 8'(e), b[51:29]};
  endfunction

  // value of a normal single (zero exponent field reads as zero), built as
  // the double with the same sign, exponent and fraction
  function automatic real to_real(logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == '0) return 0.0;
    e = 11'(int'(f[30:23]) - 127 + 1023);
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  // random normal single with exponent field in [elo, ehi]
  function automatic logic [31:0] rnd(int elo, int ehi);
    return {1'($urandom), 8'($urandom_range(ehi, elo)), 23'($urandom)};
  endfunction
endpackage
