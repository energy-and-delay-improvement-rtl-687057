// dfp_addcore: significand alignment and effective addition/subtraction for
// the decimal floating-point adder and the fused multiply-add.
//
// Operands are two finite decimal numbers (-1)^s * c * 10^e with N-digit BCD
// significands.  The operand with the larger exponent (A) is shifted left by
// dA = min(d, N+2) digits, where d is the exponent difference; the other
// operand (B) is shifted right by the remainder d - dA.  Both land in a window
// of WW = 2N+3 digits whose last digit has exponent eA - dA.  The digits of B
// pushed out of the window are not kept: the sticky bit is produced in
// parallel with the shifter by comparing the right-shift amount with the
// count of trailing zeros of B.  With N+2 digits of left shift available, a
// result that has lost digits to the sticky bit always has at least N+2
// significant digits, so the later rounding sees its true round digit.
// A zero A takes B's exponent (dA = d), so an exact result keeps the ideal
// exponent min(eA, eB).
//
// Addition uses one fast decimal adder.  Subtraction computes A + 9's
// complement(B) with carry in = not sticky (an end-around form that accounts
// for the dropped digits of B).  When no carry comes out, B > A (possible only
// without sticky), and the 9's complement of A + 9's complement(B) from a second
// adder gives B - A with the sign of B.  An exactly zero difference is +0, or
// -0 when rounding toward minus infinity.  Combinational.
// The sticky-in-parallel alignment follows the published adder; the window
// sizes and the two-adder sign handling are this design's own.
module dfp_addcore
  import dfp_pkg::*;
#(
  parameter int N = 16
) (
  input  logic              sa,
  input  logic [4*N-1:0]    ca,
  input  exp_t              ea,
  input  logic              sb,
  input  logic [4*N-1:0]    cb,
  input  exp_t              eb,
  input  rmode_e            rm,
  output logic              sign,
  output logic [4*(2*N+3)-1:0] coeff,
  output exp_t              exp_out,
  output logic              sticky
);

  localparam int K  = N + 2;
  localparam int WW = 2 * N + 3;

  logic              swap;
  logic              s_hi, s_lo;
  logic [4*N-1:0]    c_hi, c_lo;
  logic [4*WW-1:0]   aw, bw, bw9;
  logic              eff_sub;

  always_comb begin
    int d, da, db, tz;
    exp_t e_hi;
    swap = (eb > ea);
    s_hi = swap ? sb : sa;
    s_lo = swap ? sa : sb;
    c_hi = swap ? cb : ca;
    c_lo = swap ? ca : cb;
    e_hi = swap ? eb : ea;
    d    = swap ? int'(eb) - int'(ea) : int'(ea) - int'(eb);
    if (c_hi == '0) da = d;
    else            da = (d > K) ? K : d;
    db = d - da;
    // left shift of the larger-exponent operand (a zero stays zero)
    aw = (c_hi == '0) ? '0 : ((4*WW)'(c_hi) << (4 * da));
    // right shift of the other operand, sticky from its trailing zeros
    bw = (db >= N) ? '0 : ((4*WW)'(c_lo) >> (4 * db));
    tz = N;
    for (int i = N - 1; i >= 0; i--)
      if (c_lo[4*i +: 4] != 4'd0) tz = i;
    sticky  = (c_lo != '0) && (db > tz);
    exp_out = exp_t'(int'(e_hi) - da);
    eff_sub = s_hi ^ s_lo;
    for (int i = 0; i < WW; i++) bw9[4*i +: 4] = 4'd9 - bw[4*i +: 4];
  end

  logic [4*WW-1:0] sum_add, sum_s1, sum_s0;
  logic            co_add, co_s1, co_s0;

  bcd_cpa #(.ND(WW)) u_add (.a(aw), .b(bw),  .cin(1'b0),    .sum(sum_add), .cout(co_add));
  bcd_cpa #(.ND(WW)) u_s1  (.a(aw), .b(bw9), .cin(!sticky), .sum(sum_s1),  .cout(co_s1));
  bcd_cpa #(.ND(WW)) u_s0  (.a(aw), .b(bw9), .cin(1'b0),    .sum(sum_s0),  .cout(co_s0));

  always_comb begin
    logic rev;
    rev = eff_sub && !co_s1;
    if (!eff_sub) begin
      coeff = sum_add;
      sign  = s_hi;
    end else if (!rev) begin
      coeff = sum_s1;
      sign  = s_hi;
    end else begin
      for (int i = 0; i < WW; i++) coeff[4*i +: 4] = 4'd9 - sum_s0[4*i +: 4];
      sign = s_lo;
    end
    if (eff_sub && coeff == '0 && !sticky) sign = (rm == RM_RM);
  end

  // The window is wide enough that a sum never carries out of it, and the
  // reversed difference only needs the low digits of the second adder.
  logic unused;
  assign unused = co_add ^ co_s0;

endmodule
