// tb_pkg: reference helpers shared by the testbenches. Conversions between
// float32 bit patterns and double-precision real are written from the
// IEEE-754 formats directly, without the design's arithmetic: f2r is exact;
// r2f rounds to nearest even and flushes results below the normal range to
// zero, as the design does. A float32 sum, product or quotient computed in
// double and rounded once with r2f is correctly rounded, so single
// operations can be checked bit for bit.
package tb_pkg;

  function automatic real f2r(input logic [31:0] b);
    logic [63:0] d;
    if (b[30:23] == 8'h00) return 0.0;
    d = {b[31], 11'(int'(b[30:23]) - 127 + 1023), b[22:0], 29'h0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int e;
    logic [24:0] m;
    logic g, s;
    d = $realtobits(r);
    if (d[62:52] == 11'h0) return {d[63], 31'h0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    g = d[28];
    s = |d[27:0];
    if (g && (s || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hff, 23'h0};
    if (e <= 0) return {d[63], 31'h0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // A random float32 value uniform in [-scale, scale), on a 1/4096 grid.
  function automatic logic [31:0] rnd_fp(input real scale);
    return r2f(scale * (real'(int'($urandom % 8192)) - 4096.0) / 4096.0);
  endfunction

  // Float operations rounded once, for bit-exact expectations.
  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // got is within tol of want, relative to max(|want|, floor).
  function automatic bit near(input logic [31:0] got, input real want, input real tol, input real floor);
    real d, m;
    d = f2r(got) - want;
    if (d < 0.0) d = -d;
    m = (want < 0.0) ? -want : want;
    if (m < floor) m = floor;
    return d <= tol * m;
  endfunction

endpackage
