// Reference model for the floating-point testbenches.
//
// Converts between binary32 bit patterns and the simulator's double
// precision `real`, rounding double to binary32 to nearest, ties to even,
// with results below the normal range flushed to zero and results above it
// turned into infinity (the conventions of the hardware units). Because
// double precision carries more than twice the bits of binary32 plus two,
// computing +, *, / or sqrt in double and then rounding to binary32 gives
// the correctly rounded binary32 result.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        rnd, stk;
    d = $realtobits(r);
    if (d[62:52] == 11'h000) return {d[63], 31'b0};
    e   = int'(d[62:52]) - 1023 + 127;
    m   = {2'b01, d[51:29]};
    rnd = d[28];
    stk = |d[27:0];
    if (rnd && (stk || m[0])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'b0};
    if (e <= 0)   return {d[63], 31'b0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // random normal number with biased exponent in [elo, ehi]
  function automatic logic [31:0] rnd_f(input int elo, input int ehi);
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
