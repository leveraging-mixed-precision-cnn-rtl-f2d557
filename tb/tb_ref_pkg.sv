// Reference arithmetic for the testbenches, written with double-precision
// reals rather than bit-level logic so that it does not share code with the
// design. A product of two bfloat16 values is exact in a double, so every
// reference result is rounded exactly once, like the hardware.
//   bf2r     : bfloat16 -> real (subnormals read as 0)
//   r2bf     : real -> bfloat16, round to nearest even, results below the
//              smallest normal flushed to signed zero, overflow to infinity
//   ref_dq   : integer -> bfloat16 -> times S
//   ref_q    : bfloat16 times 1/S -> rounded (ties away from zero) and
//              saturated to a `bits`-wide signed integer
package tb_ref_pkg;

  function automatic real bf2r(input logic [15:0] b);
    logic [63:0] d;
    if (b[14:7] == 8'd0) return 0.0;
    d = {b[15], 11'(int'(b[14:7]) - 127 + 1023), b[6:0], 45'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [15:0] r2bf(input real r);
    logic [63:0] d;
    logic [8:0]  m;
    int          e;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 15'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:45]};
    g  = d[44];
    st = |d[43:0];
    if (g && (st || m[0])) m = m + 9'd1;
    if (m[8]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 7'd0};
    if (e <= 0)   return {d[63], 15'd0};
    return {d[63], 8'(e), m[6:0]};
  endfunction

  function automatic logic [15:0] ref_dq(input int x, input logic [15:0] s);
    // Signed zeros are kept out of the real arithmetic.
    if (x == 0 || s[14:7] == 8'd0) return {(x < 0) ^ s[15], 15'd0};
    return r2bf(bf2r(r2bf(real'(x))) * bf2r(s));
  endfunction

  function automatic int ref_q(input logic [15:0] x, input logic [15:0] s, input int bits);
    logic [15:0] p;
    real v, a, hi, lo;
    hi = real'((1 << (bits - 1)) - 1);
    lo = -real'(1 << (bits - 1));
    if (x[14:7] == 8'hFF && x[6:0] != 0) return 0;           // NaN
    if (s[14:7] == 8'hFF && s[6:0] != 0) return 0;
    if ((x[14:7] == 8'hFF && s[14:7] == 8'd0) ||
        (s[14:7] == 8'hFF && x[14:7] == 8'd0)) return 0;     // inf * 0
    if (x[14:7] == 8'hFF || s[14:7] == 8'hFF)                 // inf
      return (x[15] ^ s[15]) ? int'(lo) : int'(hi);
    p = r2bf(bf2r(x) * bf2r(s));
    if (p[14:7] == 8'hFF) return p[15] ? int'(lo) : int'(hi);
    v = bf2r(p);
    a = (v < 0.0) ? -v : v;
    a = $floor(a + 0.5);
    if (v < 0.0) a = -a;
    if (a > hi) a = hi;
    if (a < lo) a = lo;
    return int'(a);
  endfunction

  // A random bfloat16 whose exponent lies in [elo, ehi].
  function automatic logic [15:0] rand_bf(input int elo, input int ehi);
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), 8'(e), 7'($urandom)};
  endfunction

endpackage
