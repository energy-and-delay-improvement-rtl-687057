// tb_dfp_mul: self-checking test of the decimal64 multiplier.
// Random operands in all seven rounding directions, with exponents chosen so
// that products land inside the range as well as beyond both ends of it.  The
// expected result, exponent and flags are computed with wide integers in
// dfp_ref_pkg (the exact product, rounded once).  Special operands
// are checked against hand-worked rules, and exact ties (odd significand
// times 5) are checked in every direction.  The test counts inexact results,
// overflows and underflows and fails if any of them never occurred.
module tb_dfp_mul;
  import dfp_pkg::*;
  import dfp_ref_pkg::*;

  dfp_t x, y, z, res;
  logic neg_p, neg_c;
  rmode_e rm;
  dfp_flags_t flags;
  int checks = 0, failures = 0;
  int n_inexact = 0, n_ovf = 0, n_unf = 0;
  localparam bit IS_FMA = 1'b0;

  dfp_mul dut (.x(x), .y(y), .rm(rm), .res(res), .flags(flags));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dfp_t fin(logic s, logic [4*P-1:0] c, int e);
    dfp_t r;
    r.cls = CLS_FINITE; r.sign = s; r.coeff = c; r.exp = exp_t'(e);
    return r;
  endfunction

  function automatic int rexp();
    case ($urandom_range(0, 3))
      0:       return $urandom_range(0, 767) + ETINY;
      1:       return $urandom_range(0, 100) + 150;
      2:       return $urandom_range(0, 100) - 250;
      default: return $urandom_range(0, 80) - 40;
    endcase
  endfunction

  task automatic check(input logic fma);
    dfp_t er;
    dfp_flags_t ef;
    logic pinf, pzero, ps;
    #1;
    checks++;
    ps = x.sign ^ y.sign ^ neg_p;
    pinf  = x.cls == CLS_INF || y.cls == CLS_INF;
    pzero = (x.cls == CLS_FINITE && x.coeff == 0) || (y.cls == CLS_FINITE && y.coeff == 0);
    ef = '0;
    if (is_nan(x) || is_nan(y) || (fma && is_nan(z))) begin
      er = qnan(0);
      ef.invalid = x.cls == CLS_SNAN || y.cls == CLS_SNAN || (fma && z.cls == CLS_SNAN);
    end else if ((pinf && pzero) || (fma && pinf && z.cls == CLS_INF && ps != (z.sign ^ neg_c))) begin
      er = qnan(0); ef.invalid = 1;
    end else if (pinf) er = infinity(ps);
    else if (fma && z.cls == CLS_INF) er = infinity(z.sign ^ neg_c);
    else begin
      big_t np;
      np = bcd2big((4*MAXD)'(x.coeff), P) * bcd2big((4*MAXD)'(y.coeff), P);
      if (fma)
        ref_addsub(ps, np, int'(x.exp) + int'(y.exp), z.sign ^ neg_c,
                   bcd2big((4*MAXD)'(z.coeff), P), int'(z.exp), rm, er, ef);
      else
        ref_round(ps, np, int'(x.exp) + int'(y.exp), rm, er, ef);
      if (ef.inexact) n_inexact++;
      if (ef.overflow) n_ovf++;
      if (ef.underflow) n_unf++;
    end
    if (is_nan(er) ? (res.cls != CLS_QNAN || flags != ef) : (res != er || flags != ef)) begin
      failures++;
      if (failures < 10)
        $display("FAIL rm=%0d x=%0d/%0d/%h/%0d y=%0d/%0d/%h/%0d z=%0d/%0d/%h/%0d got %0d/%0d/%h/%0d f=%b exp %0d/%0d/%h/%0d f=%b",
                 rm, x.cls, x.sign, x.coeff, x.exp, y.cls, y.sign, y.coeff, y.exp,
                 z.cls, z.sign, z.coeff, z.exp,
                 res.cls, res.sign, res.coeff, res.exp, flags, er.cls, er.sign, er.coeff, er.exp, ef);
    end
  endtask

  initial begin
    logic fma;
    fma = IS_FMA;
    rm = RM_RNE;
    neg_p = 0; neg_c = 0; z = fin(0, 0, 0);
    // directed: exact, overflow, underflow, specials
    x = fin(0, 64'h0000000000000025, 3);  y = fin(1, 64'h0000000000000004, -5); check(fma);
    x = fin(0, 64'h9999999999999999, 300); y = fin(0, 64'h9999999999999999, 300); check(fma);
    x = fin(0, 64'h1234567890123456, -300); y = fin(0, 64'h1234567890123456, -300); check(fma);
    x.cls = CLS_INF; y = fin(0, 0, 0); check(fma);
    y.cls = CLS_SNAN; check(fma);
    x = fin(0, 64'h8080699100134968, 0); y = fin(0, 64'h1097924807007331, -16); check(fma);
    // exact ties: an odd 16-digit significand of at least 2*10^15 times 5 has
    // 17 digits ending in 5, so the last kept digit's parity decides RNE
    for (int k = 0; k < 280; k++) begin
      rm = rmode_e'(k % 7);
      x = fin(1'($urandom), rand_coeff(), 0);
      x.coeff[63:60] = 4'($urandom_range(2, 9));
      x.coeff[3:0]   = 4'(2 * $urandom_range(0, 4) + 1);
      y = fin(1'($urandom), 64'h5, 0);
      check(fma);
    end
    for (int k = 0; k < 20000; k++) begin
      rm = rmode_e'($urandom_range(0, 6));
      x = fin(1'($urandom), rand_coeff(), rexp());
      y = fin(1'($urandom), rand_coeff(), rexp());
      if (fma) begin
        int ez;
        neg_p = 1'($urandom);
        neg_c = 1'($urandom);
        case ($urandom_range(0, 2))
          0: ez = int'(x.exp) + int'(y.exp) + $urandom_range(0, 60) - 30;
          1: ez = int'(x.exp) + int'(y.exp) + 16 + $urandom_range(0, 6) - 3;
          default: ez = rexp();
        endcase
        if (ez < ETINY) ez = ETINY;
        if (ez > EQMAX) ez = EQMAX;
        z = fin(1'($urandom), rand_coeff(), ez);
      end
      if ($urandom_range(0, 63) == 0) x.cls = dfp_class_e'($urandom_range(1, 3));
      check(fma);
    end
    if (n_inexact == 0 || n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("coverage hole");
    end
    $display("inexact=%0d overflow=%0d underflow=%0d", n_inexact, n_ovf, n_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
