// Reference fp32 arithmetic for the testbenches, independent of the RTL.
//
// Values are widened to double precision, combined with the simulator's real
// arithmetic and rounded back to single precision (round to nearest, ties to
// even) by f_round. For one addition, multiplication or division of two
// single-precision values this double rounding gives the correctly rounded
// single-precision result. Results below the normal range are flushed to
// zero, as the RTL does.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] b;
    if (f[30:23] == 8'd0) return 0.0;
    b = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(b);
  endfunction

  function automatic logic [31:0] f_round(real r);
    logic [63:0] b;
    logic [52:0] m;
    logic [24:0] k;
    int          e;
    b = $realtobits(r);
    if (b[62:52] == 11'd0) return {b[63], 31'd0};
    e = int'(b[62:52]) - 1023 + 127;
    m = {1'b1, b[51:0]};
    k = {1'b0, m[52:29]};
    if (m[28] && ((|m[27:0]) || k[0])) k = k + 25'd1;
    if (k[24]) begin
      k = k >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {b[63], 31'd0};
    if (e >= 255) return {b[63], 8'hFF, 23'd0};
    return {b[63], 8'(e), k[22:0]};
  endfunction

  function automatic logic [31:0] r_add(logic [31:0] a, logic [31:0] b);
    return f_round(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] r_sub(logic [31:0] a, logic [31:0] b);
    return f_round(f2r(a) - f2r(b));
  endfunction

  function automatic logic [31:0] r_mul(logic [31:0] a, logic [31:0] b);
    return f_round(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] r_div(logic [31:0] a, logic [31:0] b);
    return f_round(f2r(a) / f2r(b));
  endfunction

  // squared distance, rounded after every operation like the RTL lane
  function automatic logic [31:0] r_sqdist(logic [31:0] px, logic [31:0] py,
                                           logic [31:0] cx, logic [31:0] cy);
    logic [31:0] dx, dy;
    dx = r_sub(px, cx);
    dy = r_sub(py, cy);
    return r_add(r_mul(dx, dx), r_mul(dy, dy));
  endfunction

  // random normal fp32 with exponent in [emin, emax] (unbiased) and random sign
  function automatic logic [31:0] rand_f(int emin, int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

endpackage
