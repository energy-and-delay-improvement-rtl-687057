// dfp_add: decimal64 floating-point adder/subtractor.
//
// Computes x + y, or x - y when sub is set, rounded in direction rm, with the
// IEEE 754-2008 flags.  Finite operands go through dfp_addcore (alignment with
// parallel sticky generation and the fast decimal adder) and then dfp_round.
// Special operands are resolved beside that path: a signalling NaN raises
// invalid, any NaN gives a quiet NaN that keeps the first NaN operand's sign
// and payload, infinities of opposite effective sign raise invalid, and any
// other infinity passes through.  Combinational; this is the high-speed,
// fully parallel form of the adder.
module dfp_add
  import dfp_pkg::*;
(
  input  dfp_t       x,
  input  dfp_t       y,
  input  logic       sub,
  input  rmode_e     rm,
  output dfp_t       res,
  output dfp_flags_t flags
);

  localparam int WW = 2 * P + 3;

  logic              ys;
  logic              c_sign, c_sticky;
  logic [4*WW-1:0]   c_coeff;
  exp_t              c_exp;
  dfp_t              r_res;
  dfp_flags_t        r_flags;

  assign ys = y.sign ^ sub;

  dfp_addcore #(.N(P)) u_core (
    .sa(x.sign), .ca(x.coeff), .ea(x.exp),
    .sb(ys),     .cb(y.coeff), .eb(y.exp),
    .rm(rm),
    .sign(c_sign), .coeff(c_coeff), .exp_out(c_exp), .sticky(c_sticky)
  );

  dfp_round #(.W(WW)) u_round (
    .sign(c_sign), .coeff(c_coeff), .exp_in(c_exp), .sticky_in(c_sticky),
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
    end else if (x.cls == CLS_INF && y.cls == CLS_INF && x.sign != ys) begin
      res   = qnan(1'b0);
      flags = '0;
      flags.invalid = 1'b1;
    end else if (x.cls == CLS_INF) begin
      res   = infinity(x.sign);
      flags = '0;
    end else if (y.cls == CLS_INF) begin
      res   = infinity(ys);
      flags = '0;
    end
  end

endmodule
