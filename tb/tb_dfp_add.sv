// tb_dfp_add: self-checking test of the decimal64 adder/subtractor.
// Random operands (full and short significands, exponents close together, far
// apart and near both ends of the range) are added and subtracted in all seven
// rounding directions.  The expected result, exponent and flags come from the
// wide-integer model in dfp_ref_pkg.  Directed cases cover cancellation to
// zero, overflow, underflow, sticky digits in subtraction and special values.
// It also counts how often inexact (sticky) rounding, overflow and the B > A
// subtraction path were exercised and fails if one never was.  (A sum of
// decimal64 numbers that is tiny is always exact, so addition cannot underflow.)
module tb_dfp_add;
  import dfp_pkg::*;
  import dfp_ref_pkg::*;

  dfp_t x, y, res;
  logic sub;
  rmode_e rm;
  dfp_flags_t flags;
  int checks = 0, failures = 0;
  int n_inexact = 0, n_ovf = 0, n_unf = 0, n_rev = 0;

  dfp_add dut (.x(x), .y(y), .sub(sub), .rm(rm), .res(res), .flags(flags));

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

  task automatic check();
    dfp_t er;
    dfp_flags_t ef;
    #1;
    checks++;
    if (x.cls == CLS_FINITE && y.cls == CLS_FINITE) begin
      ref_addsub(x.sign, bcd2big((4*MAXD)'(x.coeff), P), int'(x.exp),
                 y.sign ^ sub, bcd2big((4*MAXD)'(y.coeff), P), int'(y.exp), rm, er, ef);
      if (ef.inexact) n_inexact++;
      if (ef.overflow) n_ovf++;
      if (ef.underflow) n_unf++;
      if (dut.u_core.eff_sub && !dut.u_core.co_s1) n_rev++;
    end else begin
      // special operands: expected values worked out case by case
      ef = '0;
      if (x.cls inside {CLS_QNAN, CLS_SNAN} || y.cls inside {CLS_QNAN, CLS_SNAN}) begin
        er = qnan(0);
        ef.invalid = (x.cls == CLS_SNAN) || (y.cls == CLS_SNAN);
      end else if (x.cls == CLS_INF && y.cls == CLS_INF && x.sign != (y.sign ^ sub)) begin
        er = qnan(0); ef.invalid = 1;
      end else if (x.cls == CLS_INF) er = infinity(x.sign);
      else er = infinity(y.sign ^ sub);
    end
    if (er.cls inside {CLS_QNAN, CLS_SNAN} ? (res.cls != CLS_QNAN || flags != ef)
                                            : (res != er || flags != ef)) begin
      failures++;
      if (failures < 10)
        $display("FAIL rm=%0d sub=%0d x=%0d/%0d/%h/%0d y=%0d/%0d/%h/%0d got %0d/%0d/%h/%0d f=%b exp %0d/%0d/%h/%0d f=%b",
                 rm, sub, x.cls, x.sign, x.coeff, x.exp, y.cls, y.sign, y.coeff, y.exp,
                 res.cls, res.sign, res.coeff, res.exp, flags, er.cls, er.sign, er.coeff, er.exp, ef);
    end
  endtask

  initial begin
    int ex, ey;
    // directed cases
    rm = RM_RNE; sub = 1;
    x = fin(0, 64'h0000000000000123, 0); y = fin(0, 64'h0000000000000123, 0); check(); // exact zero
    rm = RM_RM; check();                                                              // -0 in RM
    rm = RM_RNE; sub = 0;
    x = fin(0, 64'h9999999999999999, 369); y = fin(0, 64'h9999999999999999, 369); check(); // overflow
    x = fin(0, 64'h1000000000000000, 5); y = fin(0, 64'h0000000000000001, -30); sub = 1;  // sticky borrow
    for (int m = 0; m < 7; m++) begin rm = rmode_e'(m); check(); end
    x = fin(0, 64'h0000000000000015, -398); y = fin(1, 64'h0000000000000009, -398); sub = 0; rm = RM_RNE; check();
    x = fin(0, 64'h0000000000000003, 10); y = fin(0, 64'h0000000000000007, 12); sub = 1; check(); // B > A
    x.cls = CLS_INF; check();
    y.cls = CLS_INF; sub = 0; check();
    y.cls = CLS_SNAN; check();
    x.cls = CLS_QNAN; y.cls = CLS_FINITE; check();
    // random cases
    for (int k = 0; k < 30000; k++) begin
      rm  = rmode_e'($urandom_range(0, 6));
      sub = 1'($urandom);
      ex  = $urandom_range(0, 767) + ETINY;
      case ($urandom_range(0, 5))
        0:       ey = ex + $urandom_range(0, 4) - 2;
        1, 2:    ey = ex + $urandom_range(0, 40) - 20;
        3:       ey = $urandom_range(0, 767) + ETINY;
        4:       begin ex = EQMAX - $urandom_range(0, 3); ey = EQMAX - $urandom_range(0, 20); end
        default: begin ex = ETINY + $urandom_range(0, 20); ey = ETINY + $urandom_range(0, 3); end
      endcase
      if (ey < ETINY) ey = ETINY;
      if (ey > EQMAX) ey = EQMAX;
      if (ex > EQMAX) ex = EQMAX;
      x = fin(1'($urandom), rand_coeff(), ex);
      y = fin(1'($urandom), rand_coeff(), ey);
      if ($urandom_range(0, 3) == 0) y.coeff = x.coeff;
      check();
    end
    if (n_inexact == 0 || n_ovf == 0 || n_rev == 0) begin
      failures++;
      $display("coverage hole: inexact=%0d overflow=%0d underflow=%0d reversed=%0d", n_inexact, n_ovf, n_unf, n_rev);
    end
    $display("inexact=%0d overflow=%0d underflow=%0d reversed=%0d", n_inexact, n_ovf, n_unf, n_rev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
