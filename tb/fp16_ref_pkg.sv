// fp16_ref_pkg: reference arithmetic for the testbenches.
//
// Works independently of the RTL: binary16 values are converted to double precision,
// added or multiplied exactly there (any sum or product of two binary16 numbers is
// exact in double), and the double result is rounded back to binary16 with
// round-to-nearest-even. Subnormal operands and results are flushed to zero, NaN is
// returned as 0x7E00, and x + (-x) gives +0, matching the semantics of the FPU.
package fp16_ref_pkg;

  function automatic bit is_nan16(input logic [15:0] x);
    return (x[14:10] == 5'h1F) && (x[9:0] != 0);
  endfunction

  function automatic bit is_inf16(input logic [15:0] x);
    return (x[14:10] == 5'h1F) && (x[9:0] == 0);
  endfunction

  function automatic bit is_zero16(input logic [15:0] x);
    return x[14:10] == 0;
  endfunction

  // Value of a finite, non-zero, normal binary16 number.
  function automatic real to_real(input logic [15:0] x);
    real m;
    int  e;
    m = 1.0 + real'(x[9:0]) / 1024.0;
    e = int'(x[14:10]) - 15;
    m = m * (2.0 ** e);
    return x[15] ? -m : m;
  endfunction

  // Round a double to binary16, round-to-nearest-even, no subnormals.
  function automatic logic [15:0] from_real(input real r);
    logic [63:0] bits;
    logic        s;
    int          e;
    logic [52:0] sig;
    logic [11:0] m;
    bit          g, st;
    if (r == 0.0) return 16'h0000;
    bits = $realtobits(r);
    s    = bits[63];
    e    = int'(bits[62:52]) - 1023;
    sig  = {1'b1, bits[51:0]};
    m    = {1'b0, sig[52:42]};
    g    = sig[41];
    st   = |sig[40:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[11]) begin m = 12'h400; e = e + 1; end
    e = e + 15;
    if (e >= 31) return {s, 15'h7C00};
    if (e <= 0)  return {s, 15'h0000};
    return {s, 5'(e), m[9:0]};
  endfunction

  function automatic logic [15:0] flush(input logic [15:0] x);
    return is_zero16(x) ? {x[15], 15'h0} : x;
  endfunction

  function automatic logic [15:0] ref_add(input logic [15:0] a0, input logic [15:0] b0);
    logic [15:0] a, b;
    a = flush(a0); b = flush(b0);
    if (is_nan16(a) || is_nan16(b)) return 16'h7E00;
    if (is_inf16(a) && is_inf16(b)) return (a[15] == b[15]) ? a : 16'h7E00;
    if (is_inf16(a)) return a;
    if (is_inf16(b)) return b;
    if (is_zero16(a) && is_zero16(b)) return {a[15] & b[15], 15'h0};
    if (is_zero16(a)) return b;
    if (is_zero16(b)) return a;
    return from_real(to_real(a) + to_real(b));
  endfunction

  function automatic logic [15:0] ref_mul(input logic [15:0] a0, input logic [15:0] b0);
    logic [15:0] a, b;
    a = flush(a0); b = flush(b0);
    if (is_nan16(a) || is_nan16(b)) return 16'h7E00;
    if ((is_inf16(a) && is_zero16(b)) || (is_zero16(a) && is_inf16(b))) return 16'h7E00;
    if (is_inf16(a) || is_inf16(b)) return {a[15] ^ b[15], 15'h7C00};
    if (is_zero16(a) || is_zero16(b)) return {a[15] ^ b[15], 15'h0};
    return from_real(to_real(a) * to_real(b));
  endfunction

  // Equality that treats any two NaNs as equal.
  function automatic bit same16(input logic [15:0] x, input logic [15:0] y);
    if (is_nan16(x) || is_nan16(y)) return is_nan16(x) && is_nan16(y);
    return x == y;
  endfunction

endpackage
