// fp_ref_pkg: reference arithmetic for the testbenches.
//
// Values of a custom (w,t) format are widened exactly into IEEE double precision,
// the operation is done in double precision (exact for products of formats with
// t <= 25 and for sums whose operands are not too far apart), and the result is
// rounded back to (w,t) by integer manipulation of the double's bit pattern:
// round to nearest, ties to even, overflow to infinity, anything below the normal
// range flushed to a signed zero. This is a different route from the hardware's
// significand datapath, so it serves as an independent check of it.
package fp_ref_pkg;

  // Widen a (w,t) bit pattern (finite values only) to a real.
  function automatic real to_real(input logic [63:0] bits, input int w, input int t);
    logic        s;
    longint      e;
    logic [63:0] m, d;
    s = bits[w+t];
    e = longint'((bits >> t) & ((64'd1 << w) - 1));
    m = bits & ((64'd1 << t) - 1);
    if (e == 0) return $bitstoreal({s, 63'd0});
    d = {s, 11'(e - ((64'd1 << (w-1)) - 1) + 1023), 52'(m << (52 - t))};
    return $bitstoreal(d);
  endfunction

  // Round a real to the (w,t) format.
  function automatic logic [63:0] from_real(input real v, input int w, input int t);
    logic [63:0] d, keep, rest, half, m;
    logic        s;
    longint      e, bias, emax;
    d    = $realtobits(v);
    s    = d[63];
    bias = (64'd1 << (w-1)) - 1;
    emax = (64'd1 << w) - 1;
    if (d[62:0] == 0) return 64'(s) << (w+t);
    e    = longint'(d[62:52]) - 1023 + bias;
    keep = 64'(d[51:0]) >> (52 - t);
    rest = 64'(d[51:0]) & ((64'd1 << (52 - t)) - 1);
    half = 64'd1 << (51 - t);
    m    = keep;
    if (rest > half || (rest == half && keep[0])) m = keep + 1;
    if (m == (64'd1 << t)) begin
      m = 0;
      e = e + 1;
    end
    if (e >= emax) return (64'(s) << (w+t)) | (64'(emax) << t);
    if (e <= 0)    return 64'(s) << (w+t);
    return (64'(s) << (w+t)) | (64'(e) << t) | m;
  endfunction

  function automatic logic [63:0] ref_mul(input logic [63:0] a, input logic [63:0] b,
                                          input int w, input int t);
    return from_real(to_real(a, w, t) * to_real(b, w, t), w, t);
  endfunction

  function automatic logic [63:0] ref_add(input logic [63:0] a, input logic [63:0] b,
                                          input int w, input int t);
    // Double arithmetic gives +0 for an exact cancellation, as round to nearest
    // requires, and keeps the sign of a sum of two equal-signed zeros.
    return from_real(to_real(a, w, t) + to_real(b, w, t), w, t);
  endfunction

  function automatic logic [63:0] neg(input logic [63:0] a, input int w, input int t);
    return a ^ (64'd1 << (w+t));
  endfunction

  // Random normal number: random sign and mantissa, exponent within
  // +/- spread of the bias (clipped to the normal range).
  function automatic logic [63:0] rand_fp(input int w, input int t, input int spread);
    longint bias, e;
    logic [63:0] m;
    bias = (64'd1 << (w-1)) - 1;
    e = bias + longint'($urandom_range(2*spread)) - spread;
    if (e < 1) e = 1;
    if (e > 2*bias) e = 2*bias;
    m = {$urandom, $urandom} & ((64'd1 << t) - 1);
    return (64'($urandom_range(1)) << (w+t)) | (64'(e) << t) | m;
  endfunction

endpackage
