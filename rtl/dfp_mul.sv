// dfp_mul: decimal64 floating-point multiplier.
//
// Two paths, as in the published multiplier.  The significand path multiplies
// the two 16-digit BCD significands exactly in the fully parallel multiplier
// (dec_mult_core: parallel partial products, carry-save tree, fast decimal
// adder), giving 32 digits.  The exponent path adds the exponents (the ideal
// exponent of a product) and dfp_round uses the leading-zero count of the
// product to shift it into 16 digits, round it in direction rm and detect
// overflow and underflow.  Special operands: a signalling NaN raises invalid,
// a NaN operand gives a quiet NaN keeping the first NaN's sign and payload,
// infinity times zero raises invalid, and any other infinity gives infinity
// with the product's sign.  Combinational.
module dfp_mul
  import dfp_pkg::*;
(
  input  dfp_t       x,
  input  dfp_t       y,
  input  rmode_e     rm,
  output dfp_t       res,
  output dfp_flags_t flags
);

  logic [8*P-1:0] prod;
  dfp_t           r_res;
  dfp_flags_t     r_flags;
  logic           ps;

  assign ps = x.sign ^ y.sign;

  dec_mult_core #(.P(P)) u_mult (.a(x.coeff), .b(y.coeff), .prod(prod));

  dfp_round #(.W(2 * P)) u_round (
    .sign(ps), .coeff(prod), .exp_in(x.exp + y.exp), .sticky_in(1'b0),
    .rm(rm), .res(r_res), .flags(r_flags)
  );

  always_comb begin
    res   = r_res;
    flags = r_flags;
    if (is_nan(x) || is_nan(y)) begin
      res       = is_nan(x) ? x : y;
      res.cls   = CLS_QNAN;
      res.exp   = '0;
      flags     = '0;
      flags.invalid = (x.cls == CLS_SNAN) || (y.cls == CLS_SNAN);
    end else if ((x.cls == CLS_INF && y.cls == CLS_FINITE && y.coeff == '0) ||
                 (y.cls == CLS_INF && x.cls == CLS_FINITE && x.coeff == '0)) begin
      res   = qnan(1'b0);
      flags = '0;
      flags.invalid = 1'b1;
    end else if (x.cls == CLS_INF || y.cls == CLS_INF) begin
      res   = infinity(ps);
      flags = '0;
    end
  end

endmodule
