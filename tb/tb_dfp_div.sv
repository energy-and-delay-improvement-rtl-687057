// tb_dfp_div: self-checking test of the Newton-Raphson decimal64 divider.
// The expected quotient is worked out with wide integers: if a * 10^s is a
// multiple of b for some s <= 40 the exact quotient (smallest s, so the
// exponent is closest to the ideal one) is rounded by the reference model;
// otherwise the truncated quotient with 40 extra digits plus a sticky digit is.
// Cases: the worked example in which truncate-and-add-one rounding goes wrong
// (8080699100134968 / 910809186219000 = 8.872 exactly), exact quotients,
// random quotients in all seven directions, overflow, underflow and special
// operands.  The latency from start to done is checked on every operation.
module tb_dfp_div;
  import dfp_pkg::*;
  import dfp_ref_pkg::*;

  localparam int NIT = 3;
  // Negative clock edges counted from the one that raises start to the one at
  // which done is seen: done rises 2*NIT+2 rising edges after the edge that
  // takes start.
  localparam int LAT = 2 * NIT + 3;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  dfp_t x, y, res;
  rmode_e rm;
  dfp_flags_t flags;
  int checks = 0, failures = 0;
  int n_inexact = 0, n_ovf = 0, n_unf = 0, n_exact = 0, n_corr = 0;

  dfp_div #(.NIT(NIT)) dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .y(y), .rm(rm),
                            .busy(busy), .done(done), .res(res), .flags(flags));

  always #5 clk = ~clk;

  initial begin
    #50000000;
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

  task automatic expected(output dfp_t er, output dfp_flags_t ef);
    big_t na, nb, q;
    int s;
    logic xz, yz;
    logic sg;
    ef = '0;
    sg = x.sign ^ y.sign;
    xz = x.cls == CLS_FINITE && x.coeff == 0;
    yz = y.cls == CLS_FINITE && y.coeff == 0;
    if (is_nan(x) || is_nan(y)) begin
      er = qnan(0); ef.invalid = x.cls == CLS_SNAN || y.cls == CLS_SNAN;
    end else if ((x.cls == CLS_INF && y.cls == CLS_INF) || (xz && yz)) begin
      er = qnan(0); ef.invalid = 1;
    end else if (x.cls == CLS_INF) er = infinity(sg);
    else if (yz) begin er = infinity(sg); ef.divzero = 1; end
    else if (y.cls == CLS_INF) er = fin(sg, 0, ETINY);
    else if (xz) begin
      s = int'(x.exp) - int'(y.exp);
      if (s < ETINY) s = ETINY;
      if (s > EQMAX) s = EQMAX;
      er = fin(sg, 0, s);
    end else begin
      na = bcd2big((4*MAXD)'(x.coeff), P);
      nb = bcd2big((4*MAXD)'(y.coeff), P);
      for (s = 0; s <= 40; s++)
        if ((na * pow10(s)) % nb == 0) break;
      if (s <= 40) begin
        q = na * pow10(s) / nb;
        n_exact++;
        ref_round(sg, q, int'(x.exp) - int'(y.exp) - s, rm, er, ef);
      end else begin
        q = na * pow10(40) / nb;
        ref_round(sg, q * 10 + 1, int'(x.exp) - int'(y.exp) - 41, rm, er, ef);
      end
      if (ef.inexact) n_inexact++;
      if (ef.overflow) n_ovf++;
      if (ef.underflow) n_unf++;
    end
  endtask

  task automatic run();
    dfp_t er;
    dfp_flags_t ef;
    int cyc;
    expected(er, ef);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (is_nan(er) ? (res.cls != CLS_QNAN || flags != ef) : (res != er || flags != ef)) begin
      failures++;
      if (failures < 10)
        $display("FAIL rm=%0d x=%0d/%0d/%h/%0d y=%0d/%0d/%h/%0d got %0d/%0d/%h/%0d f=%b exp %0d/%0d/%h/%0d f=%b",
                 rm, x.cls, x.sign, x.coeff, x.exp, y.cls, y.sign, y.coeff, y.exp,
                 res.cls, res.sign, res.coeff, res.exp, flags, er.cls, er.sign, er.coeff, er.exp, ef);
    end
    if (x.cls == CLS_FINITE && y.cls == CLS_FINITE && x.coeff != 0 && y.coeff != 0) begin
      checks++;
      if (dut.ge_b) n_corr++;
      if (cyc != LAT) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", cyc, LAT);
      end
    end
  endtask

  function automatic int rexp();
    case ($urandom_range(0, 3))
      0:       return $urandom_range(0, 767) + ETINY;
      1:       return $urandom_range(0, 60) + 300;
      2:       return $urandom_range(0, 60) - 390;
      default: return $urandom_range(0, 40) - 20;
    endcase
  endfunction

  initial begin
    rm = RM_RNE;
    x = fin(0, 0, 0); y = fin(0, 1, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the worked example: exact quotient 8.872
    x = fin(0, 64'h8080699100134968, 0); y = fin(0, 64'h0910809186219000, 0);
    for (int m = 0; m < 7; m++) begin rm = rmode_e'(m); run(); end
    x = fin(0, 64'h6, 0); y = fin(0, 64'h3, 0); run();           // 2, ideal exponent
    x = fin(0, 64'h1, 0); y = fin(0, 64'h3, 0); run();           // 0.333...
    x = fin(1, 64'h2, 0); y = fin(0, 64'h3, 0);
    for (int m = 0; m < 7; m++) begin rm = rmode_e'(m); run(); end
    x = fin(0, 64'h9999999999999999, 369); y = fin(0, 64'h1, -398); run();  // overflow
    x = fin(0, 64'h1, -398); y = fin(0, 64'h3, 10); run();                  // underflow
    x = fin(0, 64'h1, 0); y = fin(0, 0, 0); run();                           // divide by zero
    x = fin(0, 0, 0); run();                                                 // 0/0
    x.cls = CLS_INF; run();
    y = fin(0, 64'h7, 3); run();
    x = fin(0, 64'h7, 3); y.cls = CLS_INF; run();
    y.cls = CLS_SNAN; run();
    x = fin(0, 0, 100); y = fin(1, 64'h7, -3); run();
    for (int k = 0; k < 4000; k++) begin
      rm = rmode_e'($urandom_range(0, 6));
      x = fin(1'($urandom), rand_coeff(), rexp());
      y = fin(1'($urandom), rand_coeff(), rexp());
      if (y.coeff == 0) y.coeff = 64'h1;
      if ($urandom_range(0, 4) == 0) begin
        // quotient exact by construction: x = y * small
        y.coeff = 64'(($urandom_range(1, 99999)));
        y.coeff = big2bcd(big_t'(y.coeff))[4*P-1:0];
        x.coeff = big2bcd(bcd2big((4*MAXD)'(y.coeff), P) * $urandom_range(1, 99999))[4*P-1:0];
      end
      run();
    end
    if (n_inexact == 0 || n_ovf == 0 || n_unf == 0 || n_exact == 0 || n_corr == 0) begin
      failures++;
      $display("coverage hole");
    end
    $display("inexact=%0d overflow=%0d underflow=%0d exact=%0d corrected=%0d", n_inexact, n_ovf, n_unf, n_exact, n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
