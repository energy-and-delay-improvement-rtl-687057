// dfp_div: decimal64 divider using Newton-Raphson reciprocal iterations and
// a remainder check for correct rounding.
//
// Method.  Both significands are first normalised to 16 significant digits
// (A', B'), i.e. to fractions a, b in [1, 10).  A table indexed by the three
// leading digits of B' gives a five-digit start value x0 ~ 1/b.  NIT
// iterations of x(i+1) = x(i) * (2 - b * x(i)) then refine the reciprocal;
// each iteration takes two cycles of one shared fully parallel multiplier
// (dec_mult_core, MP x MP digits): first b*x, from which the fixed addend 2
// is subtracted with a fast decimal adder, then x*(2 - b*x).  The reciprocal
// is kept as an integer X = x * 10^F and truncated after each step, so it
// approaches 1/b from below.  The quotient is then a * x, truncated to P = 16
// digits (Qt), and one more multiplication gives the exact remainder
// R = A' * 10^k - Qt * B'.  Because x <= 1/b and its error is far below one
// unit in the 16th digit, Qt is the truncated quotient or one less: when
// R >= B' it is incremented and B' is taken off R.  Comparing 2R with B' tells
// whether the dropped part is zero, below, at or above one half, which drives
// the common rounding stage (dfp_round) in all seven directions.  An exact
// quotient has trailing zeros removed toward the ideal exponent ea - eb.
//
// Timing: start is taken at a clock edge where busy is low.  A finite
// division then holds busy for 2*NIT + 2 cycles (8 with NIT = 3); done rises
// at the edge that ends the last of them and stays high for one cycle, with
// res/flags valid from then until the next start.  Special operands finish
// at the edge that takes start (done is high in the next cycle):
// NaN operands give a quiet NaN (signalling NaN raises invalid), 0/0 and
// inf/inf raise invalid, x/0 raises division by zero and gives infinity,
// inf/x gives infinity, x/inf gives zero with the smallest exponent, 0/x gives
// zero with the ideal exponent.
//
// From the published divider: the iteration, the use of the parallel
// multiply-add with a fixed addend, and rounding by checking the actual
// remainder after truncating to P digits.  This design's own choices: the
// start-value table (the published unit computes its start value by a method
// it only cites), plain (non-redundant) intermediate values, F = 20 fraction
// digits, three iterations and the state sequence.
module dfp_div
  import dfp_pkg::*;
#(
  parameter int NIT = 3,    // Newton-Raphson iterations
  parameter int F   = 20    // fraction digits of the reciprocal
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  dfp_t       x,       // dividend
  input  dfp_t       y,       // divisor
  input  rmode_e     rm,
  output logic       busy,
  output logic       done,
  output dfp_t       res,
  output dfp_flags_t flags
);

  localparam int MP = F + 1;        // multiplier width in digits
  localparam int RW = P + 1;        // remainder digits

  typedef enum logic [2:0] {S_IDLE, S_M1, S_M2, S_Q, S_R} state_e;

  // ---- start-value table: T(d) = floor(2*10^7 / (2d+1)), d = 100..999 ----
  function automatic logic [19:0] to_bcd5(input int v);
    logic [19:0] r;
    for (int i = 0; i < 5; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  typedef logic [19:0] x0_tab_t [100:999];

  function automatic x0_tab_t x0_table();
    x0_tab_t t;
    for (int d = 100; d <= 999; d++) t[d] = to_bcd5(20000000 / (2 * d + 1));
    return t;
  endfunction

  // Constant ROM, filled at elaboration.
  localparam x0_tab_t X0_TAB = x0_table();

  // ---- state ----
  state_e             state;
  logic [2:0]         iter;
  logic [4*P-1:0]     an, bn;     // normalised significands A', B'
  logic [4*MP-1:0]    xr;         // reciprocal X = x * 10^F
  logic [4*MP-1:0]    et;         // 2 - b*x, scaled by 10^F
  logic [4*P-1:0]     qt;         // truncated quotient
  logic               kq;         // 1: quotient below one (k = 16)
  exp_t               eq;         // exponent of the quotient's last digit
  exp_t               eideal;     // ideal exponent ea - eb
  logic               qsign;
  rmode_e             rm_r;

  // ---- normalisation (combinational, from the inputs) ----
  logic [4*P-1:0] a_norm, b_norm;
  int             lza, lzb;
  always_comb begin
    lza = P;
    lzb = P;
    for (int i = 0; i < P; i++) begin
      if (x.coeff[4*i +: 4] != 4'd0) lza = P - 1 - i;
      if (y.coeff[4*i +: 4] != 4'd0) lzb = P - 1 - i;
    end
    a_norm = x.coeff << (4 * lza);
    b_norm = y.coeff << (4 * lzb);
  end

  logic [19:0] x0_bcd;
  always_comb begin
    logic [9:0] d;
    d = 10'(100 * b_norm[4*P-1 -: 4]) + 10'(10 * b_norm[4*P-5 -: 4]) + 10'(b_norm[4*P-9 -: 4]);
    x0_bcd = (d >= 10'd100) ? X0_TAB[d] : 20'h0;
  end

  // ---- shared multiplier ----
  logic [4*MP-1:0] ma, mb;
  logic [8*MP-1:0] mprod;

  always_comb begin
    unique case (state)
      S_M1:    begin ma = (4*MP)'(bn); mb = xr; end
      S_M2:    begin ma = xr;          mb = et; end
      S_Q:     begin ma = (4*MP)'(an); mb = xr; end
      default: begin ma = (4*MP)'(qt); mb = (4*MP)'(bn); end
    endcase
  end

  dec_mult_core #(.P(MP)) u_mult (.a(ma), .b(mb), .prod(mprod));

  // ---- 2 - b*x: fixed addend 2*10^(15+F) minus the product ----
  localparam int EW = P + F + 1;    // digits of the scaled difference
  logic [4*EW-1:0] two_c, t9, e_full;
  logic            e_cout;
  always_comb begin
    two_c = '0;
    two_c[4*(P - 1 + F) +: 4] = 4'd2;
    for (int i = 0; i < EW; i++) t9[4*i +: 4] = 4'd9 - mprod[4*i +: 4];
  end
  bcd_cpa #(.ND(EW)) u_fix (.a(two_c), .b(t9), .cin(1'b1), .sum(e_full), .cout(e_cout));

  // ---- remainder R = A' * 10^k - Qt * B' and its corrections ----
  localparam int AW = 2 * P + 1;
  logic [4*AW-1:0] ash, p9, r_full;
  logic            r_cout;
  always_comb begin
    ash = kq ? ((4*AW)'(an) << (4 * P)) : ((4*AW)'(an) << (4 * (P - 1)));
    for (int i = 0; i < AW; i++) p9[4*i +: 4] = 4'd9 - mprod[4*i +: 4];
  end
  bcd_cpa #(.ND(AW)) u_rem (.a(ash), .b(p9), .cin(1'b1), .sum(r_full), .cout(r_cout));

  // R < 2B', so RW digits hold it; R - B' decides the quotient correction.
  logic [4*RW-1:0] r0, b9, r1, rc, r2, tw;
  logic            ge_b, c2, tw_c;
  logic [4*P-1:0]  qinc, qc;
  logic            qinc_c;
  assign r0 = r_full[4*RW-1:0];
  always_comb
    for (int i = 0; i < RW; i++) b9[4*i +: 4] = 4'd9 - ((i < P) ? bn[4*i +: 4] : 4'd0);
  bcd_cpa #(.ND(RW)) u_rsub (.a(r0), .b(b9), .cin(1'b1), .sum(r1), .cout(ge_b));
  bcd_cpa #(.ND(P))  u_qinc (.a(qt), .b('0), .cin(1'b1), .sum(qinc), .cout(qinc_c));
  assign rc = ge_b ? r1 : r0;
  assign qc = ge_b ? qinc : qt;
  bcd_cpa #(.ND(RW)) u_r2   (.a(rc), .b(rc), .cin(1'b0), .sum(r2), .cout(c2));
  // 2R - B' : carry out means 2R >= B'
  bcd_cpa #(.ND(RW)) u_half (.a(r2), .b(b9), .cin(1'b1), .sum(tw), .cout(tw_c));

  // ---- final rounding ----
  logic [4*(P+1)-1:0] rcoeff;
  exp_t               rexp;
  dfp_t               rres;
  dfp_flags_t         rflags;
  always_comb begin
    logic [3:0] rdig;
    int tz, sh;
    logic rzero, two_gt;
    rzero  = (rc == '0);
    two_gt = tw_c && (tw != '0 || c2);
    if (rzero)                   rdig = 4'd0;
    else if (!tw_c && !c2)       rdig = 4'd2;   // below one half
    else if (!two_gt && !c2)     rdig = 4'd5;   // exactly one half
    else                         rdig = 4'd7;   // above one half
    tz = P;
    for (int i = P - 1; i >= 0; i--)
      if (qc[4*i +: 4] != 4'd0) tz = i;
    sh = 0;
    if (rzero && eq < eideal) sh = (int'(eideal) - int'(eq) < tz) ? int'(eideal) - int'(eq) : tz;
    if (rzero) begin
      // exact: no extra digit, trailing zeros removed toward the ideal exponent
      rcoeff = (4*(P+1))'(qc >> (4 * sh));
      rexp   = exp_t'(int'(eq) + sh);
    end else begin
      // inexact: one more digit stands for the remainder's position vs. 1/2
      rcoeff = {qc, rdig};
      rexp   = exp_t'(int'(eq) - 1);
    end
  end

  dfp_round #(.W(P + 1)) u_round (
    .sign(qsign), .coeff(rcoeff), .exp_in(rexp), .sticky_in(1'b0),
    .rm(rm_r), .res(rres), .flags(rflags)
  );

  // ---- sequencing ----
  logic special;
  dfp_t       sp_res;
  dfp_flags_t sp_flags;
  always_comb begin
    logic xz, yz;
    int   e;
    e  = int'(x.exp) - int'(y.exp);
    xz = (x.cls == CLS_FINITE) && (x.coeff == '0);
    yz = (y.cls == CLS_FINITE) && (y.coeff == '0);
    special  = 1'b1;
    sp_res   = '0;
    sp_flags = '0;
    if (is_nan(x) || is_nan(y)) begin
      sp_res     = is_nan(x) ? x : y;
      sp_res.cls = CLS_QNAN;
      sp_res.exp = '0;
      sp_flags.invalid = (x.cls == CLS_SNAN) || (y.cls == CLS_SNAN);
    end else if ((x.cls == CLS_INF && y.cls == CLS_INF) || (xz && yz)) begin
      sp_res = qnan(1'b0);
      sp_flags.invalid = 1'b1;
    end else if (x.cls == CLS_INF) begin
      sp_res = infinity(x.sign ^ y.sign);
    end else if (yz) begin
      sp_res = infinity(x.sign ^ y.sign);
      sp_flags.divzero = 1'b1;
    end else if (y.cls == CLS_INF) begin
      sp_res.sign = x.sign ^ y.sign;
      sp_res.exp  = exp_t'(ETINY);
    end else if (xz) begin
      if (e < ETINY) e = ETINY;
      if (e > EQMAX) e = EQMAX;
      sp_res.sign = x.sign ^ y.sign;
      sp_res.exp  = exp_t'(e);
    end else begin
      special = 1'b0;
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      iter   <= '0;
      done   <= 1'b0;
      res    <= '0;
      flags  <= '0;
      an     <= '0;
      bn     <= '0;
      xr     <= '0;
      et     <= '0;
      qt     <= '0;
      kq     <= 1'b0;
      eq     <= '0;
      eideal <= '0;
      qsign  <= 1'b0;
      rm_r   <= RM_RNE;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (special) begin
            res   <= sp_res;
            flags <= sp_flags;
            done  <= 1'b1;
          end else begin
            an     <= a_norm;
            bn     <= b_norm;
            xr     <= (4*MP)'(x0_bcd) << (4 * (F - 5));
            kq     <= (a_norm < b_norm);   // BCD compares like binary
            eideal <= x.exp - y.exp;
            eq     <= exp_t'(int'(x.exp) - int'(y.exp) - lza + lzb - ((a_norm < b_norm) ? P : P - 1));
            qsign  <= x.sign ^ y.sign;
            rm_r   <= rm;
            iter   <= '0;
            state  <= S_M1;
          end
        end
        S_M1: begin
          et    <= e_full[4*(P-1) +: 4*MP];
          state <= S_M2;
        end
        S_M2: begin
          xr   <= mprod[4*F +: 4*MP];
          iter <= iter + 3'd1;
          state <= (int'(iter) == NIT - 1) ? S_Q : S_M1;
        end
        S_Q: begin
          qt    <= kq ? mprod[4*(F-1) +: 4*P] : mprod[4*F +: 4*P];
          state <= S_R;
        end
        S_R: begin
          res   <= rres;
          flags <= rflags;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The fixed-addend difference and the remainder are never negative, the
  // quotient increment never carries out, and 2R fits in RW digits.
  logic unused;
  assign unused = e_cout ^ r_cout ^ qinc_c;

endmodule
