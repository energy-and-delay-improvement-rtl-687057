// dfp_fma: decimal64 fused multiply-add, (-1)^neg_p * (x * y) + (-1)^neg_c * z,
// with a single rounding at the end.
//
// The exact 32-digit product of x and y comes from the same fully parallel
// significand multiplier as dfp_mul (dec_mult_core) and is never rounded.  z
// is widened to 32 digits and aligned against the product in dfp_addcore
// (N = 32: a 67-digit window, sticky generated in parallel with the shift),
// and the exact sum is rounded once by dfp_round.  Because the product is
// kept exact, overflow, underflow and inexact can arise only from the final
// sum, as the standard requires.  Special operands: a signalling NaN raises
// invalid; a NaN gives a quiet NaN (first NaN operand's sign and payload);
// infinity times zero, and an infinite product plus an opposite infinite
// addend, raise invalid; otherwise an infinity gives infinity.
// The published unit injects the aligned addend into the carry-save tree and
// uses a 3p-digit final adder; this version adds the addend after the tree,
// in a wider window, which gives the same results.  Combinational.
module dfp_fma
  import dfp_pkg::*;
(
  input  dfp_t       x,
  input  dfp_t       y,
  input  dfp_t       z,
  input  logic       neg_p,
  input  logic       neg_c,
  input  rmode_e     rm,
  output dfp_t       res,
  output dfp_flags_t flags
);

  localparam int N  = 2 * P;
  localparam int WW = 2 * N + 3;

  logic [4*N-1:0]  prod;
  logic            ps, zs;
  logic            c_sign, c_sticky;
  logic [4*WW-1:0] c_coeff;
  exp_t            c_exp;
  dfp_t            r_res;
  dfp_flags_t      r_flags;

  assign ps = x.sign ^ y.sign ^ neg_p;
  assign zs = z.sign ^ neg_c;

  dec_mult_core #(.P(P)) u_mult (.a(x.coeff), .b(y.coeff), .prod(prod));

  dfp_addcore #(.N(N)) u_core (
    .sa(ps), .ca(prod), .ea(x.exp + y.exp),
    .sb(zs), .cb({(4*P)'(0), z.coeff}), .eb(z.exp),
    .rm(rm),
    .sign(c_sign), .coeff(c_coeff), .exp_out(c_exp), .sticky(c_sticky)
  );

  dfp_round #(.W(WW)) u_round (
    .sign(c_sign), .coeff(c_coeff), .exp_in(c_exp), .sticky_in(c_sticky),
    .rm(rm), .res(r_res), .flags(r_flags)
  );

  always_comb begin
    logic pinf, pzero;
    pinf  = (x.cls == CLS_INF) || (y.cls == CLS_INF);
    pzero = (x.cls == CLS_FINITE && x.coeff == '0) || (y.cls == CLS_FINITE && y.coeff == '0);
    res   = r_res;
    flags = r_flags;
    if (x.cls == CLS_SNAN || y.cls == CLS_SNAN || z.cls == CLS_SNAN ||
        x.cls == CLS_QNAN || y.cls == CLS_QNAN || z.cls == CLS_QNAN) begin
      res       = is_nan(x) ? x : is_nan(y) ? y : z;
      res.cls   = CLS_QNAN;
      res.exp   = '0;
      flags     = '0;
      flags.invalid = (x.cls == CLS_SNAN) || (y.cls == CLS_SNAN) || (z.cls == CLS_SNAN);
    end else if ((pinf && pzero) || (pinf && z.cls == CLS_INF && ps != zs)) begin
      res   = qnan(1'b0);
      flags = '0;
      flags.invalid = 1'b1;
    end else if (pinf) begin
      res   = infinity(ps);
      flags = '0;
    end else if (z.cls == CLS_INF) begin
      res   = infinity(zs);
      flags = '0;
    end
  end

endmodule
