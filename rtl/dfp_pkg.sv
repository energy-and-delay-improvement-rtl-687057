// dfp_pkg: shared types, constants and helper functions of the decimal
// floating-point (DFP) units.
//
// The units work on decimal64 numbers of the IEEE 754-2008 standard: a sign,
// a significand of P = 16 decimal digits and an exponent between ETINY = -398
// and EQMAX = 369 (the exponent of the least significant digit).  Inside the
// units the significand is kept as plain BCD, four bits per digit, digit 0 in
// bits [3:0].  The packed interchange word uses the densely packed decimal
// (DPD) encoding; the DPD declet functions below follow the standard's tables.
//
// Seven rounding directions are supported.  Their numeric codes are this
// design's own choice (the standard names them, it does not number them).
package dfp_pkg;

  localparam int P     = 16;    // digits in a decimal64 significand
  localparam int EMAX  = 384;   // largest adjusted exponent
  localparam int EMIN  = -383;  // smallest normal adjusted exponent
  localparam int BIAS  = 398;   // exponent bias of the interchange format
  localparam int ETINY = -398;  // smallest exponent of the last digit
  localparam int EQMAX = 369;   // largest exponent of the last digit

  // Exponent of the last significand digit, wide enough for products,
  // alignment offsets and rounding adjustments.
  typedef logic signed [13:0] exp_t;

  typedef enum logic [2:0] {
    RM_RNE = 3'd0,  // to nearest, ties to even
    RM_RNA = 3'd1,  // to nearest, ties away from zero
    RM_RNZ = 3'd2,  // to nearest, ties toward zero
    RM_RZ  = 3'd3,  // toward zero
    RM_RA  = 3'd4,  // away from zero
    RM_RP  = 3'd5,  // toward plus infinity
    RM_RM  = 3'd6   // toward minus infinity
  } rmode_e;

  typedef enum logic [1:0] {
    CLS_FINITE = 2'd0,
    CLS_INF    = 2'd1,
    CLS_QNAN   = 2'd2,
    CLS_SNAN   = 2'd3
  } dfp_class_e;

  typedef struct packed {
    dfp_class_e         cls;
    logic               sign;
    exp_t               exp;    // exponent of the last digit (unbiased)
    logic [4*P-1:0]     coeff;  // BCD significand (NaN payload for NaNs)
  } dfp_t;

  typedef struct packed {
    logic invalid;
    logic divzero;
    logic overflow;
    logic underflow;
    logic inexact;
  } dfp_flags_t;

  typedef enum logic [2:0] {
    OP_ADD = 3'd0,
    OP_SUB = 3'd1,
    OP_MUL = 3'd2,
    OP_FMA = 3'd3,
    OP_DIV = 3'd4,
    OP_SQRT = 3'd5
  } dfp_op_e;

  localparam dfp_flags_t NO_FLAGS = '0;

  function automatic dfp_t qnan(input logic s);
    dfp_t r;
    r       = '0;
    r.cls   = CLS_QNAN;
    r.sign  = s;
    return r;
  endfunction

  function automatic dfp_t infinity(input logic s);
    dfp_t r;
    r       = '0;
    r.cls   = CLS_INF;
    r.sign  = s;
    return r;
  endfunction

  function automatic logic is_nan(input dfp_t x);
    return x.cls == CLS_QNAN || x.cls == CLS_SNAN;
  endfunction

  // Three BCD digits to one 10-bit DPD declet (bit 9 first: p q r s t u v w x y).
  function automatic logic [9:0] bcd_to_dpd(input logic [11:0] d);
    logic a, b, c, dd, e, f, g, h, i, j, k, m;
    {a, b, c, dd} = d[11:8];
    {e, f, g, h}  = d[7:4];
    {i, j, k, m}  = d[3:0];
    unique case ({a, e, i})
      3'b000: return {b, c, dd, f, g, h, 1'b0, j, k, m};
      3'b001: return {b, c, dd, f, g, h, 1'b1, 2'b00, m};
      3'b010: return {b, c, dd, j, k, h, 1'b1, 2'b01, m};
      3'b100: return {j, k, dd, f, g, h, 1'b1, 2'b10, m};
      3'b110: return {j, k, dd, 2'b00, h, 1'b1, 2'b11, m};
      3'b101: return {f, g, dd, 2'b01, h, 1'b1, 2'b11, m};
      3'b011: return {b, c, dd, 2'b10, h, 1'b1, 2'b11, m};
      default: return {2'b00, dd, 2'b11, h, 1'b1, 2'b11, m};
    endcase
  endfunction

  // One DPD declet to three BCD digits (accepts all 1024 codes).
  function automatic logic [11:0] dpd_to_bcd(input logic [9:0] x);
    logic p, q, r, s, t, u, v, w, xx, y;
    {p, q, r, s, t, u, v, w, xx, y} = x;
    if (!v)
      return {1'b0, p, q, r, 1'b0, s, t, u, 1'b0, w, xx, y};
    unique case ({w, xx})
      2'b00: return {1'b0, p, q, r, 1'b0, s, t, u, 3'b100, y};
      2'b01: return {1'b0, p, q, r, 3'b100, u, 1'b0, s, t, y};
      2'b10: return {3'b100, r, 1'b0, s, t, u, 1'b0, p, q, y};
      default:
        unique case ({s, t})
          2'b00: return {3'b100, r, 3'b100, u, 1'b0, p, q, y};
          2'b01: return {3'b100, r, 1'b0, p, q, u, 3'b100, y};
          2'b10: return {1'b0, p, q, r, 3'b100, u, 3'b100, y};
          default: return {3'b100, r, 3'b100, u, 3'b100, y};
        endcase
    endcase
  endfunction

endpackage
