// tb_fp_pkg: reference arithmetic for the testbenches.
//
// Converts between IEEE754 single-precision bit patterns and the
// simulator's double-precision real. r2f rounds a real to single precision
// (round to nearest even, results below the normal range flushed to zero),
// so that r2f(f2r(a) op f2r(b)) is the correctly rounded single-precision
// result of +, -, *, / and sqrt: double precision carries more than twice
// the 24 significand bits plus two, so the double rounding is harmless.
// rand_f draws a random normal number with a biased exponent in [emin, emax].
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'd0) return $bitstoreal({f[31], 63'd0});
    e = 11'(int'(f[30:23]) - 127 + 1023);
    if (f[30:23] == 8'hFF) e = 11'h7FF;
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(real x);
    logic [63:0] b;
    logic [24:0] mm;
    logic        up;
    int          ef;
    b = $realtobits(x);
    if (b[62:52] == 11'd0) return {b[63], 31'd0};
    if (b[62:52] == 11'h7FF) return (b[51:0] != 52'd0) ? 32'h7FC0_0000 : {b[63], 8'hFF, 23'd0};
    ef = int'(b[62:52]) - 1023 + 127;
    up = b[28] & ((|b[27:0]) | b[29]);
    mm = {2'b01, b[51:29]} + {24'd0, up};
    if (mm[24]) begin
      mm = mm >> 1;
      ef = ef + 1;
    end
    if (ef >= 255) return {b[63], 8'hFF, 23'd0};
    if (ef <= 0)   return {b[63], 31'd0};
    return {b[63], ef[7:0], mm[22:0]};
  endfunction

  function automatic logic [31:0] rand_f(int emin, int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
