// tb_dfp_accel: end-to-end test of the accelerator through its Avalon-MM
// slave port, acting as the host processor would: write the operands as
// 32-bit halves, write the control word, poll the status word, read back the
// result and flags.  Operands and results cross the bus in the DPD interchange
// encoding (the tb encodes and decodes with the codec modules, which have
// their own test).  Every operation (add, subtract, multiply, FMA with all
// sign options, divide, square root) runs in all seven rounding directions with random
// operands, and the result is compared with the wide-integer reference model.
// It counts how often each operation, each rounding direction, each flag
// (invalid, division by zero, overflow, underflow, inexact), a busy status
// seen while polling and an ignored control write during a division occurred,
// and counts a failure for any that never did.  The completion latency of
// each operation class is checked as well.  Runs at the default parameters.
module tb_dfp_accel;
  import dfp_pkg::*;
  import dfp_ref_pkg::*;

  localparam int NIT = 3;
  // Cycles from the control write (counted from the falling edge that drives
  // it) to the falling edge at which the status word first shows done.
  localparam int LAT_COMB    = 2;
  localparam int LAT_DIV     = 2 * NIT + 5;
  localparam int LAT_SQRT    = 3 * NIT + 6;
  localparam int LAT_DIV_SPC = 3;           // division or root, special operand

  logic        clk = 0, rst_n = 0;
  logic [3:0]  avs_address = '0;
  logic        avs_write = 0, avs_read = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;

  dfp_accel dut (.clk(clk), .rst_n(rst_n), .avs_address(avs_address), .avs_write(avs_write),
                 .avs_writedata(avs_writedata), .avs_read(avs_read), .avs_readdata(avs_readdata));

  // codec helpers
  dfp_t        enc_d, dec_d;
  logic [63:0] enc_w, dec_w;
  dpd_pack64   h_pack   (.d(enc_d), .w(enc_w));
  dpd_unpack64 h_unpack (.w(dec_w), .d(dec_d));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_op[6], n_rm[7];
  int n_inv = 0, n_dz = 0, n_ovf = 0, n_unf = 0, n_inx = 0, n_busy = 0, n_ignored = 0;

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1;
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1;
    #1 d = avs_readdata;
    @(negedge clk);
    avs_read = 0;
  endtask

  function automatic dfp_t fin(logic s, logic [4*P-1:0] c, int e);
    dfp_t r;
    r.cls = CLS_FINITE; r.sign = s; r.coeff = c; r.exp = exp_t'(e);
    return r;
  endfunction

  task automatic encode(input dfp_t d, output logic [63:0] w);
    enc_d = d;
    #1 w = enc_w;
  endtask

  task automatic write_operand(input logic [3:0] base, input dfp_t d);
    logic [63:0] w;
    encode(d, w);
    bus_write(base, w[31:0]);
    bus_write(base + 4'd1, w[63:32]);
  endtask

  // Reference result of one operation (finite or special operands).
  task automatic reference(input dfp_op_e op, input rmode_e rm, input logic np, input logic nc,
                           input dfp_t a, input dfp_t b, input dfp_t c,
                           output dfp_t er, output dfp_flags_t ef);
    big_t na, nb, nc_, q;
    int s;
    na = bcd2big((4*MAXD)'(a.coeff), P);
    nb = bcd2big((4*MAXD)'(b.coeff), P);
    nc_ = bcd2big((4*MAXD)'(c.coeff), P);
    ef = '0;
    case (op)
      OP_ADD, OP_SUB:
        ref_addsub(a.sign, na, int'(a.exp), b.sign ^ (op == OP_SUB), nb, int'(b.exp), rm, er, ef);
      OP_MUL:
        ref_round(a.sign ^ b.sign, na * nb, int'(a.exp) + int'(b.exp), rm, er, ef);
      OP_FMA:
        ref_addsub(a.sign ^ b.sign ^ np, na * nb, int'(a.exp) + int'(b.exp), c.sign ^ nc, nc_,
                   int'(c.exp), rm, er, ef);
      OP_SQRT: begin
        if (na == 0) er = fin(a.sign, 0, floor_half(int'(a.exp)));
        else if (a.sign) begin er = qnan(0); ef.invalid = 1; end
        else void'(ref_sqrt(na, int'(a.exp), rm, er, ef));
      end
      default: begin
        if (nb == 0 && na == 0) begin er = qnan(0); ef.invalid = 1; end
        else if (nb == 0) begin er = infinity(a.sign ^ b.sign); ef.divzero = 1; end
        else if (na == 0) begin
          s = int'(a.exp) - int'(b.exp);
          if (s < ETINY) s = ETINY;
          if (s > EQMAX) s = EQMAX;
          er = fin(a.sign ^ b.sign, 0, s);
        end else begin
          for (s = 0; s <= 40; s++)
            if ((na * pow10(s)) % nb == 0) break;
          if (s <= 40) ref_round(a.sign ^ b.sign, na * pow10(s) / nb, int'(a.exp) - int'(b.exp) - s, rm, er, ef);
          else ref_round(a.sign ^ b.sign, (na * pow10(40) / nb) * 10 + 1, int'(a.exp) - int'(b.exp) - 41, rm, er, ef);
        end
      end
    endcase
  endtask

  task automatic run_op(input dfp_op_e op, input rmode_e rm, input logic np, input logic nc,
                        input dfp_t a, input dfp_t b, input dfp_t c, input logic poke);
    dfp_t er;
    dfp_flags_t ef, gf;
    logic [31:0] st, lo, hi;
    int cyc, exp_lat;
    reference(op, rm, np, nc, a, b, c, er, ef);
    write_operand(4'd0, a);
    write_operand(4'd2, b);
    write_operand(4'd4, c);
    // control write, then count cycles until done
    @(negedge clk);
    avs_address = 4'd6; avs_writedata = {24'd0, nc, np, rm, op}; avs_write = 1;
    @(negedge clk);
    avs_write = 0;
    if (poke) begin
      // a second control word while the divider or root is busy must be ignored
      avs_address = 4'd6; avs_writedata = {24'd0, 2'b00, RM_RNE, OP_ADD}; avs_write = 1;
      @(negedge clk);
      avs_write = 0;
      n_ignored++;
    end
    cyc = poke ? 2 : 1;
    avs_address = 4'd7; avs_read = 1;
    #1 st = avs_readdata;
    while (!st[1] && cyc < 200) begin
      if (st[0]) n_busy++;
      @(negedge clk);
      cyc++;
      #1 st = avs_readdata;
    end
    avs_read = 0;
    gf = dfp_flags_t'(st[6:2]);
    bus_read(4'd8, lo);
    bus_read(4'd9, hi);
    dec_w = {hi, lo};
    #1;
    checks++;
    if (is_nan(er) ? (dec_d.cls != CLS_QNAN || gf != ef) : (dec_d != er || gf != ef)) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%0d rm=%0d a=%0d/%h/%0d b=%0d/%h/%0d c=%0d/%h/%0d got %0d/%0d/%h/%0d f=%b exp %0d/%0d/%h/%0d f=%b",
                 op, rm, a.sign, a.coeff, a.exp, b.sign, b.coeff, b.exp, c.sign, c.coeff, c.exp,
                 dec_d.cls, dec_d.sign, dec_d.coeff, dec_d.exp, gf, er.cls, er.sign, er.coeff, er.exp, ef);
    end
    checks++;
    if (op == OP_DIV) exp_lat = (a.coeff != 0 && b.coeff != 0) ? LAT_DIV : LAT_DIV_SPC;
    else if (op == OP_SQRT) exp_lat = (a.coeff != 0 && !a.sign) ? LAT_SQRT : LAT_DIV_SPC;
    else exp_lat = LAT_COMB;
    if (cyc != exp_lat) begin
      failures++;
      $display("FAIL latency op=%0d: %0d cycles, expected %0d", op, cyc, exp_lat);
    end
    n_op[op]++;
    n_rm[rm]++;
    if (gf.invalid) n_inv++;
    if (gf.divzero) n_dz++;
    if (gf.overflow) n_ovf++;
    if (gf.underflow) n_unf++;
    if (gf.inexact) n_inx++;
  endtask

  function automatic int rexp(input int spread);
    return $urandom_range(0, 2 * spread) - spread;
  endfunction

  initial begin
    dfp_t a, b, c;
    foreach (n_op[i]) n_op[i] = 0;
    foreach (n_rm[i]) n_rm[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // directed: exact example quotient, divide by zero, invalid, overflow, underflow
    run_op(OP_DIV, RM_RNE, 0, 0, fin(0, 64'h8080699100134968, 0), fin(0, 64'h0910809186219000, 0), fin(0, 0, 0), 1);
    run_op(OP_DIV, RM_RNE, 0, 0, fin(0, 64'h1, 0), fin(0, 0, 0), fin(0, 0, 0), 0);
    run_op(OP_DIV, RM_RNE, 0, 0, fin(0, 0, 0), fin(0, 0, 0), fin(0, 0, 0), 0);
    run_op(OP_MUL, RM_RNE, 0, 0, fin(0, 64'h9999999999999999, 300), fin(0, 64'h9999999999999999, 300), fin(0, 0, 0), 0);
    run_op(OP_MUL, RM_RNE, 0, 0, fin(0, 64'h1234567890123456, -300), fin(0, 64'h1234567890123456, -300), fin(0, 0, 0), 0);
    run_op(OP_FMA, RM_RNE, 0, 1, fin(0, 64'h3, 0), fin(0, 64'h3333333333333333, -16), fin(0, 64'h1, 0), 0);
    run_op(OP_SQRT, RM_RNE, 0, 0, fin(0, 64'h2, 0), fin(0, 0, 0), fin(0, 0, 0), 1);
    for (int k = 0; k < 700; k++) begin
      dfp_op_e op;
      op = dfp_op_e'($urandom_range(0, 5));
      a = fin(1'($urandom), rand_coeff(), rexp(200));
      b = fin(1'($urandom), rand_coeff(), int'(a.exp) + rexp(20));
      c = fin(1'($urandom), rand_coeff(), int'(a.exp) + int'(b.exp) + rexp(20));
      if (int'(c.exp) < ETINY) c.exp = exp_t'(ETINY);
      if (int'(c.exp) > EQMAX) c.exp = exp_t'(EQMAX);
      if (op == OP_DIV && b.coeff == 0) b.coeff = 64'h7;
      if (op == OP_SQRT && k % 10 != 0) a.sign = 0;
      run_op(op, rmode_e'(k % 7), 1'($urandom), 1'($urandom), a, b, c,
             (op == OP_DIV || op == OP_SQRT) && k % 50 == 0);
    end
    foreach (n_op[i]) if (n_op[i] == 0) begin failures++; $display("operation %0d never ran", i); end
    foreach (n_rm[i]) if (n_rm[i] == 0) begin failures++; $display("rounding direction %0d never ran", i); end
    if (n_inv == 0 || n_dz == 0 || n_ovf == 0 || n_unf == 0 || n_inx == 0 || n_busy == 0 || n_ignored == 0) begin
      failures++;
      $display("coverage hole");
    end
    $display("ops add=%0d sub=%0d mul=%0d fma=%0d div=%0d sqrt=%0d; invalid=%0d divzero=%0d overflow=%0d underflow=%0d inexact=%0d busy-polls=%0d ignored-ctrl=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_inv, n_dz, n_ovf, n_unf, n_inx, n_busy, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
