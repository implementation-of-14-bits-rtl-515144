// fp14_ref_pkg: reference arithmetic for the 14-bit floating-point testbenches.
//
// The functions work on real numbers, independently of the RTL: an operand is
// decoded to its exact value (1 + man/256) * 2^(exp-15), or 0 for exponent
// field 0; the exact result is computed in double precision (every product or
// sum of two such numbers is exact there); and the result is encoded back by
// scaling it into [1, 2) and truncating the fraction to eight bits. Results
// with an exponent of 0 or less become a zero carrying the result's sign.
// Results with an exponent above 31 either keep the low five exponent bits
// (the multiplier) or saturate to exponent 31, mantissa FF (the adder).
package fp14_ref_pkg;
  import fp14_pkg::*;

  function automatic real pow2(int n);
    real r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real to_real(fp14_t x);
    real m;
    if (x.exp == 0) return 0.0;
    m = 1.0 + real'(x.man) / 256.0;
    m = m * pow2(int'(x.exp) - 15);
    return x.sign ? -m : m;
  endfunction

  typedef struct packed {
    fp14_t y;
    logic  uf;
    logic  of;
    logic  shifted;  // value was >= 2 in the unit's own scale (see encode)
  } enc_t;

  // Encode sign and magnitude; wrap = 1 keeps low exponent bits on overflow.
  function automatic enc_t encode(logic sign, real mag, bit wrap);
    enc_t r;
    real  t;
    int   k;
    int   e;
    r = '0;
    r.y.sign = sign;
    if (mag == 0.0) return r;
    t = mag;
    k = 0;
    while (t >= 2.0) begin t = t / 2.0; k++; end
    while (t < 1.0)  begin t = t * 2.0; k--; end
    e = k + 15;
    if (e <= 0) begin
      r.uf = 1'b1;
      return r;
    end
    r.y.man = 8'(longint'($floor((t - 1.0) * 256.0)));
    if (e > 31) begin
      r.of = 1'b1;
      if (wrap) r.y.exp = 5'(e);
      else begin
        r.y.exp = 5'h1f;
        r.y.man = 8'hff;
      end
    end else begin
      r.y.exp = 5'(e);
    end
    return r;
  endfunction

  function automatic enc_t ref_mul(fp14_t a, fp14_t b);
    enc_t r;
    logic s = a.sign ^ b.sign;
    if (a.exp == 0 || b.exp == 0) begin
      r = '0;
      r.y.sign = s;
      return r;
    end
    r = encode(s, (to_real(a) < 0 ? -to_real(a) : to_real(a)) *
                  (to_real(b) < 0 ? -to_real(b) : to_real(b)), 1'b1);
    r.shifted = ((1.0 + real'(a.man) / 256.0) * (1.0 + real'(b.man) / 256.0)) >= 2.0;
    return r;
  endfunction

  // Multiplier variant with infinity: exponent field 31 is infinity, results
  // with an exponent of 31 or more become infinity, a zero operand gives zero.
  function automatic enc_t ref_mul_inf(fp14_t a, fp14_t b);
    enc_t r;
    logic s = a.sign ^ b.sign;
    r = '0;
    r.y.sign = s;
    if (a.exp == 0 || b.exp == 0) return r;
    if (a.exp == 31 || b.exp == 31) begin
      r.y.exp = 5'h1f;
      return r;
    end
    r = ref_mul(a, b);
    if (r.of || r.y.exp == 31) begin
      r.of    = 1'b1;
      r.y.exp = 5'h1f;
      r.y.man = 8'h00;
    end
    return r;
  endfunction

  function automatic enc_t ref_add(fp14_t a, fp14_t b);
    real v = to_real(a) + to_real(b);
    return encode(v < 0.0, v < 0.0 ? -v : v, 1'b0);
  endfunction

  function automatic enc_t ref_sub(fp14_t a, fp14_t b);
    real v = to_real(a) - to_real(b);
    return encode(v < 0.0, v < 0.0 ? -v : v, 1'b0);
  endfunction

  function automatic fp14_t rand_fp14();
    return fp14_t'($urandom_range(16383, 0));
  endfunction

  // Operand pairs biased toward interesting cases: equal exponents,
  // neighbouring values, zeros and extreme exponents.
  function automatic fp14_t rand_near(fp14_t a);
    fp14_t b;
    case ($urandom_range(5, 0))
      0: b = a;
      1: begin b = a; b.man = 8'(a.man + 8'($urandom_range(2, 0)) - 8'd1); end
      2: begin b = rand_fp14(); b.exp = a.exp; end
      3: begin b = rand_fp14(); b.exp = 5'($urandom_range(1, 0) ? 0 : 31); end
      default: b = rand_fp14();
    endcase
    if ($urandom_range(1, 0) != 0) b.sign = ~b.sign;
    return b;
  endfunction

endpackage
