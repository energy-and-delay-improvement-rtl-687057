// dfp_ref_pkg: reference arithmetic for the testbenches of the decimal
// floating-point units.
//
// Values are handled as wide binary integers (big_t, 288 bits, enough for
// 86 decimal digits), so the expected results are computed by ordinary integer
// arithmetic and not by any of the BCD circuits under test.  The rounding
// model implements the decimal64 rules: keep the exact result when it fits in
// 16 digits (exponent as close to the ideal one as possible), otherwise round
// in one of seven directions; subnormal results, exponent clamping and overflow
// follow IEEE 754-2008.
package dfp_ref_pkg;
  import dfp_pkg::*;

  typedef logic [287:0] big_t;
  localparam int MAXD = 86;

  function automatic big_t pow10(input int n);
    big_t r = 1;
    for (int i = 0; i < n; i++) r = r * 10;
    return r;
  endfunction

  function automatic big_t bcd2big(input logic [4*MAXD-1:0] v, input int nd);
    big_t r = 0;
    for (int i = nd - 1; i >= 0; i--) r = r * 10 + big_t'(v[4*i +: 4]);
    return r;
  endfunction

  function automatic logic [4*MAXD-1:0] big2bcd(input big_t x);
    logic [4*MAXD-1:0] r = '0;
    for (int i = 0; i < MAXD; i++) begin
      r[4*i +: 4] = 4'(x % 10);
      x = x / 10;
    end
    return r;
  endfunction

  function automatic int ndigits(input big_t x);
    int n = 0;
    while (x != 0) begin
      x = x / 10;
      n++;
    end
    return n;
  endfunction

  // Random BCD significand with 0..P digits (biased toward full length).
  function automatic logic [4*P-1:0] rand_coeff();
    logic [4*P-1:0] r = '0;
    int n;
    case ($urandom_range(0, 7))
      0: n = 0;
      1, 2: n = $urandom_range(1, P);
      default: n = P;
    endcase
    for (int i = 0; i < n; i++) r[4*i +: 4] = 4'($urandom_range(0, 9));
    return r;
  endfunction

  // Round the exact value (-1)^s * n * 10^e to a decimal64 result.
  function automatic void ref_round(input logic s, input big_t n, input int e,
                                    input rmode_e rm, output dfp_t r,
                                    output dfp_flags_t f);
    int nd, sh, shc, ndq;
    big_t q, rem, half;
    logic gt, eq, nz, inc;
    f  = '0;
    nd = ndigits(n);
    sh = 0;
    if (nd - P > sh) sh = nd - P;
    if (ETINY - e > sh) sh = ETINY - e;
    shc = (sh > nd + 1) ? nd + 1 : sh;
    q = n / pow10(shc);
    rem = n % pow10(shc);
    half = pow10(shc) / 2;
    gt = (shc > 0) && (rem > half);
    eq = (shc > 0) && (rem == half);
    nz = (rem != 0);
    case (rm)
      RM_RNE: inc = gt || (eq && q[0]);
      RM_RNA: inc = gt || eq;
      RM_RNZ: inc = gt;
      RM_RZ:  inc = 0;
      RM_RA:  inc = nz;
      RM_RP:  inc = nz && !s;
      default: inc = nz && s;
    endcase
    e = e + sh;
    q = q + big_t'(inc);
    if (q == pow10(P)) begin
      q = pow10(P - 1);
      e = e + 1;
    end
    f.inexact   = nz;
    f.underflow = nz && (n != 0) && (e - sh + nd - 1 < EMIN);
    r = '0;
    r.cls  = CLS_FINITE;
    r.sign = s;
    ndq = ndigits(q);
    if (q == 0) begin
      if (e > EQMAX) e = EQMAX;
    end else if (e + ndq - 1 > EMAX) begin
      f.overflow = 1;
      f.inexact  = 1;
      if (rm == RM_RZ || (rm == RM_RP && s) || (rm == RM_RM && !s)) begin
        q = pow10(P) - 1;
        e = EQMAX;
      end else begin
        r.cls = CLS_INF;
        q = 0;
        e = 0;
      end
    end else if (e > EQMAX) begin
      q = q * pow10(e - EQMAX);
      e = EQMAX;
    end
    r.exp   = exp_t'(e);
    r.coeff = big2bcd(q)[4*P-1:0];
  endfunction

  // Exact signed sum of two finite operands, rounded.  A far smaller operand is
  // replaced by a one-unit stand-in below the rounding position, which rounds
  // identically and keeps the integers small.
  function automatic void ref_addsub(input logic sa, input big_t na, input int ea,
                                     input logic sb, input big_t nb, input int eb,
                                     input rmode_e rm, output dfp_t r,
                                     output dfp_flags_t f);
    int m, k;
    big_t xa, xb, mag;
    logic s;
    if (na == 0 && nb == 0) begin
      ref_round(0, 0, (ea < eb) ? ea : eb, rm, r, f);
      r.sign = (sa == sb) ? sa : (rm == RM_RM);
      return;
    end
    if (na != 0 && nb != 0 && ea - eb > ndigits(nb) + P + 2) begin
      k = ndigits(na) + P + 6;
      xa = na * pow10(k); xb = 1; m = ea - k;
    end else if (na != 0 && nb != 0 && eb - ea > ndigits(na) + P + 2) begin
      k = ndigits(nb) + P + 6;
      xb = nb * pow10(k); xa = 1; m = eb - k;
    end else begin
      // With one operand zero the exact result is the other one, written
      // with an exponent as close to min(ea, eb) as 16 digits allow.
      m = (ea < eb) ? ea : eb;
      if (na == 0 && eb - (P + 2) > m) m = eb - (P + 2);
      if (nb == 0 && ea - (P + 2) > m) m = ea - (P + 2);
      xa = na * pow10(ea - m);
      xb = nb * pow10(eb - m);
    end
    if (sa == sb) begin
      mag = xa + xb; s = sa;
    end else if (xa >= xb) begin
      mag = xa - xb; s = sa;
    end else begin
      mag = xb - xa; s = sb;
    end
    ref_round(s, mag, m, rm, r, f);
    if (mag == 0) r.sign = (rm == RM_RM);
  endfunction

  // Integer square root by Newton's method, starting above the root.
  function automatic big_t big_isqrt(input big_t n);
    big_t r, t;
    r = pow10((ndigits(n) + 1) / 2 + 1);
    forever begin
      t = (r + n / r) / 2;
      if (t >= r) break;
      r = t;
    end
    return r;
  endfunction

  function automatic int floor_half(input int e);
    return (e >= 0) ? e / 2 : -((1 - e) / 2);
  endfunction

  // Square root of a finite positive operand n * 10^e, rounded.  The operand,
  // with its exponent made even, is scaled by 10^40; an exact root has its
  // trailing zeros removed toward the ideal exponent floor(e/2), an inexact one
  // is S followed by a nonzero sticky digit.  Returns 1 when the root is exact.
  function automatic bit ref_sqrt(input big_t n, input int e, input rmode_e rm,
                                  output dfp_t r, output dfp_flags_t f);
    big_t s;
    int ideal;
    ideal = floor_half(e);
    if (e % 2 != 0) begin n = n * 10; e = e - 1; end
    n = n * pow10(40);
    e = e - 40;
    s = big_isqrt(n);
    if (s * s == n) begin
      e = e / 2;
      while (s % 10 == 0 && e < ideal) begin s = s / 10; e++; end
      ref_round(0, s, e, rm, r, f);
      return 1;
    end
    ref_round(0, s * 10 + 1, e / 2 - 1, rm, r, f);
    return 0;
  endfunction

endpackage
