// Reference arithmetic for the testbenches: conversions between IEEE-754
// single precision bit patterns and SystemVerilog real (double precision),
// computed from the bit fields, so that the checks do not depend on the
// simulator's shortreal support. r2f rounds to nearest even, flushes results
// below the normal range to zero and saturates to infinity, matching the
// conventions of the floating-point units. A single-precision sum or product
// computed in double precision and then rounded with r2f is the correctly
// rounded single-precision result (53 >= 2*24 + 2).
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic        s, g, st;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {s, 31'd0};
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  // random single-precision number with exponent field in [emin, emax]
  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(emin + int'($urandom % 32'(emax - emin + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

endpackage
