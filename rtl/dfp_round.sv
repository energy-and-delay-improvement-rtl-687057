// dfp_round: final rounding stage shared by the decimal64 adder, multiplier
// and fused multiply-add.
//
// Input is an exact intermediate result (-1)^sign * coeff * 10^exp with a
// W-digit BCD significand, plus a sticky bit that stands for nonzero digits
// already shifted out below coeff.  Output is the decimal64 result of P
// digits and its flags.  Steps, all combinational:
//   1. Leading-zero count gives the number of significant digits nd.  The
//      right shift is the larger of nd-P (precision) and ETINY-exp (subnormal
//      range); the digit just below the cut is the round digit and everything
//      further down ORs into the sticky bit.
//   2. The rounding direction, sign, round digit, sticky bit and the parity of
//      the last kept digit decide an increment of one unit in the last place,
//      which is added as the carry in of a fast decimal adder (bcd_cpa).  An
//      increment that carries out of P digits gives 10^(P-1) and exp+1.
//   3. A result whose adjusted exponent exceeds EMAX overflows to infinity or
//      to the largest finite number, as the direction demands.  A finite
//      result whose last-digit exponent exceeds EQMAX is clamped by appending
//      zeros.  Underflow is flagged when the exact result is below the normal
//      range (tininess before rounding, as the standard prescribes for
//      decimal) and the result is inexact.
// When the exact result fits, it is returned unchanged, so the exponent stays
// as close to the operation's ideal exponent as P digits allow.
// The seven directions are those the units support; the shift-then-increment
// structure is this design's own.
module dfp_round
  import dfp_pkg::*;
#(
  parameter int W = 35
) (
  input  logic           sign,
  input  logic [4*W-1:0] coeff,
  input  exp_t           exp_in,
  input  logic           sticky_in,
  input  rmode_e         rm,
  output dfp_t           res,
  output dfp_flags_t     flags
);

  localparam int SW = $clog2(W + 2) + 1;

  logic [SW-1:0]  nd;        // significant digits of coeff
  logic [SW-1:0]  shc;       // right shift, limited to W+1
  exp_t           e_sh;      // exponent after the shift
  logic [4*P-1:0] q;         // truncated significand
  logic [3:0]     rd;        // round digit
  logic           st;        // sticky below the round digit
  logic           inc;
  logic [4*P-1:0] q1;
  logic           q1_cout;

  always_comb begin
    int sh;
    int lz;
    lz = W;
    for (int i = 0; i < W; i++)
      if (coeff[4*i +: 4] != 4'd0) lz = W - 1 - i;
    nd = SW'(W - lz);
    sh = 0;
    if (int'(nd) - P > sh) sh = int'(nd) - P;
    if (ETINY - int'(exp_in) > sh) sh = ETINY - int'(exp_in);
    e_sh = exp_t'(int'(exp_in) + sh);
    shc = (sh > W + 1) ? SW'(W + 1) : SW'(sh);
    q = (4*P)'(coeff >> (4 * shc));
    rd = '0;
    st = sticky_in;
    for (int i = 0; i < W; i++) begin
      if (i + 1 == int'(shc)) rd = coeff[4*i +: 4];
      if (i + 1 < int'(shc) && coeff[4*i +: 4] != 4'd0) st = 1'b1;
    end
  end

  always_comb begin
    logic nz;
    nz = (rd != 4'd0) || st;
    unique case (rm)
      RM_RNE:  inc = (rd > 4'd5) || (rd == 4'd5 && (st || q[0]));
      RM_RNA:  inc = (rd >= 4'd5);
      RM_RNZ:  inc = (rd > 4'd5) || (rd == 4'd5 && st);
      RM_RZ:   inc = 1'b0;
      RM_RA:   inc = nz;
      RM_RP:   inc = nz && !sign;
      RM_RM:   inc = nz && sign;
      default: inc = 1'b0;
    endcase
  end

  bcd_cpa #(.ND(P)) u_inc (.a(q), .b('0), .cin(inc), .sum(q1), .cout(q1_cout));

  always_comb begin
    logic [4*P-1:0] qf;
    exp_t           ef;
    int             ndq;
    logic           inexact, tiny, ovf;
    qf = q1;
    ef = e_sh;
    if (q1_cout) begin
      qf = '0;
      qf[4*(P-1) +: 4] = 4'd1;
      ef = e_sh + exp_t'(1);
    end
    ndq = 0;
    for (int i = 0; i < P; i++)
      if (qf[4*i +: 4] != 4'd0) ndq = i + 1;
    inexact = (rd != 4'd0) || st;
    tiny    = (nd != 0) && (int'(exp_in) + int'(nd) - 1 < EMIN);
    ovf     = (ndq != 0) && (int'(ef) + ndq - 1 > EMAX);

    res       = '0;
    res.cls   = CLS_FINITE;
    res.sign  = sign;
    flags     = '0;
    flags.inexact   = inexact;
    flags.underflow = tiny && inexact;
    if (ovf) begin
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
      if (rm == RM_RZ || (rm == RM_RP && sign) || (rm == RM_RM && !sign)) begin
        res.coeff = {P{4'd9}};
        res.exp   = exp_t'(EQMAX);
      end else begin
        res.cls   = CLS_INF;
      end
    end else if (int'(ef) > EQMAX) begin
      // clamp: pad with zeros (exact, fits because the result did not overflow)
      res.coeff = qf << (4 * (int'(ef) - EQMAX));
      res.exp   = exp_t'(EQMAX);
    end else begin
      res.coeff = qf;
      res.exp   = ef;
    end
  end

endmodule
