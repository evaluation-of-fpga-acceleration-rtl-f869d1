// cnn_pkg: types and float32 arithmetic shared by every layer of the CNN.
//
// value_bus_t is the one bus every process speaks: a 32-bit IEEE-754 single
// precision value, an enable (the value is valid this cycle) and a last flag
// (this is the final value of a group: a window, a channel or a whole input).
// There is no ready signal; a bus is a broadcast that every receiver must take
// in the cycle it is driven.
//
// The float functions are combinational; a process that calls one registers
// the result, so each arithmetic process is one pipeline stage. They round to
// nearest, ties to even. Subnormal operands and results are flushed to zero
// and a NaN operand gives infinity: the network only handles finite, normal
// activations. These limits are this design's choice; the layer equations and
// the use of float32 follow the reference network.
package cnn_pkg;

  typedef struct packed {
    logic        en;
    logic        last;
    logic [31:0] val;
  } value_bus_t;

  localparam value_bus_t VB_IDLE = '{en: 1'b0, last: 1'b0, val: 32'h0};

  localparam logic [31:0] FP_ZERO = 32'h0000_0000;
  localparam logic [31:0] FP_ONE  = 32'h3f80_0000;

  // Round a normalised magnitude to float32. mant holds the 24 kept bits with
  // the hidden one at bit 23, g is the first dropped bit and s the OR of the
  // rest. exp is the biased exponent before rounding.
  function automatic logic [31:0] fp_pack(input logic sign, input logic signed [11:0] exp,
                                          input logic [23:0] mant, input logic g, input logic s);
    logic [24:0] m;
    logic signed [11:0] e;
    m = {1'b0, mant};
    e = exp;
    if (g && (s || mant[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 12'sd1;
    end
    if (e >= 12'sd255) return {sign, 8'hff, 23'h0};
    if (e <= 12'sd0) return {sign, 31'h0};
    return {sign, e[7:0], m[22:0]};
  endfunction

  function automatic logic fp_is_zero(input logic [31:0] a);
    return a[30:23] == 8'h00;
  endfunction

  function automatic logic fp_is_inf(input logic [31:0] a);
    return a[30:23] == 8'hff;
  endfunction

  // Sum of two floats. The smaller operand is aligned into a 50-bit window
  // (24 mantissa bits and 26 spare bits) so the sum is exact before rounding;
  // an operand more than 26 binades smaller cannot change the rounded result.
  function automatic logic [31:0] fp_add(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] x, y;
    logic [7:0]  d;
    logic [50:0] mx, my, s;
    logic [5:0]  lz;
    logic signed [11:0] e;
    if (fp_is_inf(a)) return {a[31], 8'hff, 23'h0};
    if (fp_is_inf(b)) return {b[31], 8'hff, 23'h0};
    if (fp_is_zero(a) && fp_is_zero(b)) return {a[31] & b[31], 31'h0};
    if (fp_is_zero(a)) return b;
    if (fp_is_zero(b)) return a;
    if (a[30:0] >= b[30:0]) begin
      x = a; y = b;
    end else begin
      x = b; y = a;
    end
    d = x[30:23] - y[30:23];
    if (d > 8'd26) return x;
    mx = {2'b01, x[22:0], 26'h0};
    my = {2'b01, y[22:0], 26'h0} >> d;
    s  = (x[31] == y[31]) ? mx + my : mx - my;
    if (s == '0) return FP_ZERO;
    // leading-zero count: the highest set bit wins
    lz = 6'd0;
    for (int i = 0; i <= 50; i++) begin
      if (s[i]) lz = 6'(50 - i);
    end
    s = s << lz;
    e = $signed({4'h0, x[30:23]}) + 12'sd1 - $signed({6'h0, lz});
    return fp_pack(x[31], e, s[50:27], s[26], |s[25:0]);
  endfunction

  function automatic logic [31:0] fp_neg(input logic [31:0] a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic logic [31:0] fp_sub(input logic [31:0] a, input logic [31:0] b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic logic [31:0] fp_mul(input logic [31:0] a, input logic [31:0] b);
    logic sign;
    logic [47:0] p;
    logic signed [11:0] e;
    sign = a[31] ^ b[31];
    if (fp_is_inf(a) || fp_is_inf(b)) return {sign, 8'hff, 23'h0};
    if (fp_is_zero(a) || fp_is_zero(b)) return {sign, 31'h0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = $signed({4'h0, a[30:23]}) + $signed({4'h0, b[30:23]}) - 12'sd127;
    if (p[47]) return fp_pack(sign, e + 12'sd1, p[47:24], p[23], |p[22:0]);
    return fp_pack(sign, e, p[46:23], p[22], |p[21:0]);
  endfunction

  // Quotient a / b: a 50-bit by 24-bit integer division gives 26 or 27
  // quotient bits; the remainder feeds the sticky bit.
  function automatic logic [31:0] fp_div(input logic [31:0] a, input logic [31:0] b);
    logic sign;
    logic [49:0] n, q, r;
    logic signed [11:0] e;
    sign = a[31] ^ b[31];
    if (fp_is_zero(b) || fp_is_inf(a)) return {sign, 8'hff, 23'h0};
    if (fp_is_zero(a) || fp_is_inf(b)) return {sign, 31'h0};
    n = {1'b1, a[22:0], 26'h0};
    q = n / {26'h0, 1'b1, b[22:0]};
    r = n % {26'h0, 1'b1, b[22:0]};
    e = $signed({4'h0, a[30:23]}) - $signed({4'h0, b[30:23]}) + 12'sd127;
    // q lies in [2^25, 2^27)
    if (q[26]) return fp_pack(sign, e, q[26:3], q[2], (|q[1:0]) | (|r));
    return fp_pack(sign, e - 12'sd1, q[25:2], q[1], q[0] | (|r));
  endfunction

  // a > b in the float order (+0 and -0 are equal).
  function automatic logic fp_gt(input logic [31:0] a, input logic [31:0] b);
    logic az, bz;
    az = fp_is_zero(a);
    bz = fp_is_zero(b);
    if (az && bz) return 1'b0;
    if (az) return b[31];
    if (bz) return ~a[31];
    if (a[31] != b[31]) return b[31];
    if (!a[31]) return a[30:0] > b[30:0];
    return a[30:0] < b[30:0];
  endfunction

  function automatic logic [31:0] fp_max(input logic [31:0] a, input logic [31:0] b);
    return fp_gt(b, a) ? b : a;
  endfunction

  // Natural exponential. x is taken as a fixed-point number t = x*log2(e)
  // with 40 fraction bits, split into an integer n and a fraction f, and
  // exp(x) = 2^n * 2^f where 2^f = e^(f ln 2) is a 14-term Taylor series in
  // the same fixed-point format (truncation error below 2^-40).
  localparam int EXP_FB = 40;
  localparam logic [63:0] LOG2E_Q = 64'd1586259972107;   // round(log2(e) * 2^40)
  localparam logic [63:0] LN2_Q   = 64'd762123384786;    // round(ln(2) * 2^40)

  function automatic logic [31:0] fp_exp(input logic [31:0] x);
    logic signed [127:0] xf, t;
    logic signed [31:0]  n;
    logic [63:0] f, y, term, acc;
    int sh;
    if (fp_is_zero(x)) return FP_ONE;
    // |x| >= 128: the result is outside the float range either way
    if (x[30:23] >= 8'd134) return x[31] ? FP_ZERO : {1'b0, 8'hff, 23'h0};
    // |x| < 2^-26: exp(x) rounds to 1
    if (x[30:23] < 8'd101) return FP_ONE;
    // x as a fixed-point value with EXP_FB fraction bits (exact: exponent >= -26)
    sh = int'(x[30:23]) - 127 - 23 + EXP_FB;   // in [-9, 23]
    xf = {104'h0, 1'b1, x[22:0]};
    if (sh >= 0) xf = xf <<< sh;
    else xf = xf >>> (-sh);
    if (x[31]) xf = -xf;
    t = (xf * $signed({64'h0, LOG2E_Q})) >>> EXP_FB;
    n = 32'(t >>> EXP_FB);
    f = 64'(t - (128'(n) <<< EXP_FB));          // in [0, 2^40)
    y = 64'((128'(f) * 128'(LN2_Q)) >> EXP_FB);
    acc  = 64'd1 << EXP_FB;
    term = 64'd1 << EXP_FB;
    for (int k = 1; k <= 14; k++) begin
      term = 64'((128'(term) * 128'(y)) >> EXP_FB) / 64'(k);
      acc  = acc + term;
    end
    // acc in [2^40, 2^41): hidden one at bit 40
    if (acc[41]) return fp_pack(1'b0, 12'(n) + 12'sd128, acc[41:18], acc[17], |acc[16:0]);
    return fp_pack(1'b0, 12'(n) + 12'sd127, acc[40:17], acc[16], |acc[15:0]);
  endfunction

endpackage
