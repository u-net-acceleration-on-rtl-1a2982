// Reference FP16 arithmetic for the testbenches, written with `real` (IEEE
// double) and independent of the RTL's fixed-point method.
//
// ref_fma(a, b, c) returns round-to-nearest-even(a*b + c) in binary16. The
// product of two FP16 values is exact in double; the sum s = p + c may round,
// so the exact rounding error is recovered with the TwoSum algorithm and used
// to break ties when s lies exactly halfway between two FP16 values. Special
// cases follow IEEE 754 with the quiet NaN 16'h7E00.
package fp16_ref_pkg;

  function automatic real f16_to_real(input logic [15:0] h);
    int  e;
    real m, v;
    e = int'(h[14:10]);
    m = real'(h[9:0]);
    if (e == 0) v = m * (2.0 ** -24);
    else        v = (1024.0 + m) * (2.0 ** (e - 25));
    return h[15] ? -v : v;
  endfunction

  // round x (> 0) plus a tiny error err to FP16, ignoring the sign
  function automatic logic [15:0] round_mag(input real x, input real err);
    int  e;
    real q, t, n, frac;
    int  bits;
    e = 0;
    while (x >= 2.0 ** (e + 1)) e++;
    while (x < 2.0 ** e) e--;
    q = (e < -14) ? 2.0 ** -24 : 2.0 ** (e - 10);
    t = x / q;
    n = $floor(t);
    frac = t - n;
    if (frac > 0.5) n = n + 1.0;
    else if (frac == 0.5) begin
      if (err > 0.0) n = n + 1.0;
      else if (err == 0.0 && (int'(n) % 2 == 1)) n = n + 1.0;
    end
    if (e < -14) bits = int'(n);
    else         bits = ((e + 15) << 10) + int'(n) - 1024;
    if (bits >= 'h7C00) bits = 'h7C00;
    return 16'(bits);
  endfunction

  function automatic logic is_nan(input logic [15:0] h);
    return (h[14:10] == 5'h1F) && (h[9:0] != 0);
  endfunction

  function automatic logic is_inf(input logic [15:0] h);
    return (h[14:10] == 5'h1F) && (h[9:0] == 0);
  endfunction

  function automatic logic [15:0] ref_fma(input logic [15:0] a, input logic [15:0] b,
                                          input logic [15:0] c);
    real p, cr, s, bb, err;
    logic sp;
    logic [15:0] mag;
    sp = a[15] ^ b[15];
    if (is_nan(a) || is_nan(b) || is_nan(c)) return 16'h7E00;
    if ((is_inf(a) && b[14:0] == 0) || (is_inf(b) && a[14:0] == 0)) return 16'h7E00;
    if (is_inf(a) || is_inf(b)) begin
      if (is_inf(c) && c[15] != sp) return 16'h7E00;
      return {sp, 15'h7C00};
    end
    if (is_inf(c)) return c;
    p  = f16_to_real(a) * f16_to_real(b);
    cr = f16_to_real(c);
    s  = p + cr;
    bb = s - p;
    err = (p - (s - bb)) + (cr - bb);
    if (s == 0.0) return {sp & c[15], 15'h0};
    if (s > 0.0) begin
      mag = round_mag(s, err);
      return {1'b0, mag[14:0]};
    end
    mag = round_mag(-s, -err);
    return {1'b1, mag[14:0]};
  endfunction

  // a finite FP16 value with a random sign, exponent in [emin, emax]
  // (biased, 0 = subnormal) and random fraction
  function automatic logic [15:0] rand_f16(input int emin, input int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 5'(e), 10'($urandom)};
  endfunction

endpackage
