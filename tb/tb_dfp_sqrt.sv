// tb_dfp_sqrt: self-checking test of the Newton-Raphson decimal64 square root.
// The expected root is worked out with wide integers: the operand, with its
// exponent made even, is scaled by 10^40 and its integer square root S is
// found by Newton's method on 288-bit integers.  If S^2 is the scaled operand
// the root is exact and its trailing zeros are removed toward the ideal
// exponent floor(e/2); otherwise S followed by a nonzero sticky digit is
// rounded by the reference model.  Cases: exact squares (random integers
// squared), random operands over the whole exponent range including
// subnormals, all seven directions, zeros of both signs, negative operands,
// infinities and NaNs.  The latency from start to done is checked on every
// finite nonzero operand, and the test fails if the remainder correction step
// or an exact or inexact root never occurred.
module tb_dfp_sqrt;
  import dfp_pkg::*;
  import dfp_ref_pkg::*;

  localparam int NIT = 3;
  // Negative clock edges counted from the one that raises start to the one at
  // which done is seen: done rises 3*NIT+3 rising edges after the edge that
  // takes start.
  localparam int LAT = 3 * NIT + 4;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  dfp_t x, res;
  rmode_e rm;
  dfp_flags_t flags;
  int checks = 0, failures = 0;
  int n_inexact = 0, n_exact = 0, n_corr = 0;

  dfp_sqrt #(.NIT(NIT)) dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .rm(rm),
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
    ef = '0;
    if (is_nan(x)) begin
      er = qnan(0); ef.invalid = x.cls == CLS_SNAN;
    end else if (x.cls == CLS_FINITE && x.coeff == 0) begin
      er = fin(x.sign, 0, floor_half(int'(x.exp)));
    end else if (x.sign) begin
      er = qnan(0); ef.invalid = 1;
    end else if (x.cls == CLS_INF) begin
      er = infinity(0);
    end else begin
      if (ref_sqrt(bcd2big((4*MAXD)'(x.coeff), P), int'(x.exp), rm, er, ef)) n_exact++;
      if (ef.inexact) n_inexact++;
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
        $display("FAIL rm=%0d x=%0d/%0d/%h/%0d got %0d/%0d/%h/%0d f=%b exp %0d/%0d/%h/%0d f=%b",
                 rm, x.cls, x.sign, x.coeff, x.exp,
                 res.cls, res.sign, res.coeff, res.exp, flags, er.cls, er.sign, er.coeff, er.exp, ef);
    end
    if (x.cls == CLS_FINITE && !x.sign && x.coeff != 0) begin
      checks++;
      if (dut.gt_2q) n_corr++;
      if (cyc != LAT) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", cyc, LAT);
      end
    end
  endtask

  initial begin
    rm = RM_RNE;
    x = fin(0, 0, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    x = fin(0, 64'h4, 0); run();                          // 2
    x = fin(0, 64'h4, 1); run();                          // sqrt(40)
    x = fin(0, 64'h1, -2); run();                         // 0.1
    x = fin(0, 64'h100, 0); run();                        // 10, ideal exponent 0
    x = fin(0, 64'h2, 0);
    for (int m = 0; m < 7; m++) begin rm = rmode_e'(m); run(); end
    x = fin(0, 64'h9999999999999999, 369); run();
    x = fin(0, 64'h1, -398); run();
    x = fin(0, 64'h1, 0); x.sign = 1; run();              // invalid
    x = fin(1, 0, -7); run();                             // -0
    x = fin(0, 0, 9); run();
    x.cls = CLS_INF; run();
    x.sign = 1; run();
    x.cls = CLS_SNAN; run();
    x.cls = CLS_QNAN; run();
    for (int k = 0; k < 4000; k++) begin
      rm = rmode_e'($urandom_range(0, 6));
      x = fin(0, rand_coeff(), $urandom_range(0, 767) + ETINY);
      if (k % 5 == 0) begin
        // exact square by construction
        big_t r;
        r = big_t'($urandom_range(1, 99999999));
        x.coeff = big2bcd(r * r)[4*P-1:0];
      end
      if (k % 50 == 1) x.sign = 1;
      run();
    end
    if (n_inexact == 0 || n_exact == 0 || n_corr == 0) begin
      failures++;
      $display("coverage hole");
    end
    $display("inexact=%0d exact=%0d corrected=%0d", n_inexact, n_exact, n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
