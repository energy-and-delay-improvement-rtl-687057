// dfp_sqrt: decimal64 square root using Newton-Raphson reciprocal square
// root iterations and a remainder check for correct rounding.
//
// Method.  The significand is normalised to 16 significant digits A' with
// exponent e'.  M = A' * 10^t, t = 15 or 16 chosen so that e' - t is even,
// has 31 or 32 digits, so Q = floor(sqrt(M)) has exactly 16 digits and the
// result is Q * 10^((e'-t)/2).  With m = M / 10^30 in [1, 100), a table
// indexed by t and the three leading digits of A' gives a five-digit start
// value y0 ~ 1/sqrt(m).  NIT iterations of
//     y(i+1) = y(i) * (3 - m * y(i)^2) / 2 = y(i) * (1.5 - (m/2) * y(i)^2)
// refine it; m/2 is formed once (A' * 5) and 1.5 is the fixed addend.  Each
// iteration takes three cycles of one shared fully parallel multiplier
// (dec_mult_core, MP x MP digits): s = y*y (rounded up), u = (m/2)*s (rounded
// up), then y*(1.5 - u) (truncated).  Rounding every step toward the safe
// side keeps y below 1/sqrt(m), since the iteration itself never overshoots.
// Then Q is taken as m*y truncated to 16 digits, which is the true
// floor(sqrt(M)) or one less; one more multiplication gives
// R = M - Q^2.  If R > 2Q, Q is incremented and R reduced by 2Q + 1.  R = 0
// means exact; R > Q means the dropped part is above one half, otherwise it
// is below (a square root is never exactly halfway).  The common rounding
// stage dfp_round then applies the direction.  An exact root has trailing
// zeros removed toward the ideal exponent floor(e/2).
//
// Timing: start is taken at a clock edge where busy is low.  A finite,
// nonzero, positive operand holds busy for 3*NIT + 3 cycles (12 with
// NIT = 3); done rises at the edge that ends the last of them and stays high
// for one cycle, with res/flags valid until the next start.  Special operands
// finish at the edge that takes start: NaN gives a quiet NaN (signalling NaN
// raises invalid), +-0 gives +-0 with exponent floor(e/2), +inf gives +inf,
// and a negative nonzero operand or -inf raises invalid.
//
// From the published unit: the reciprocal square root iteration on the same
// fixed-addend multiply-add hardware as the divider, and rounding by checking
// the remainder of the truncated result.  This design's own choices: the
// start-value table, the rounding direction of each step, F = 20 fraction
// digits, three iterations and the state sequence.
module dfp_sqrt
  import dfp_pkg::*;
#(
  parameter int NIT = 3,    // Newton-Raphson iterations
  parameter int F   = 20    // fraction digits of the reciprocal square root
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  dfp_t       x,
  input  rmode_e     rm,
  output logic       busy,
  output logic       done,
  output dfp_t       res,
  output dfp_flags_t flags
);

  localparam int MP = F + 2;        // multiplier width in digits (m < 100)
  localparam int MW = 2 * P + 1;    // digits of M and Q^2
  localparam int RW = P + 2;        // digits of the remainder

  typedef enum logic [2:0] {S_IDLE, S_H, S_S, S_U, S_Y, S_Q, S_R} state_e;

  // ---- start-value table ----
  // Y0(t, d) = floor(sqrt(10^10 / m)) for the midpoint m of the interval of
  // the three leading digits d = 100..999: m = (2d+1)/200 for t = 15 and
  // m = (2d+1)/20 for t = 16.
  function automatic longint isqrt(input longint v);
    longint r, c;
    r = 0;
    for (int b = 20; b >= 0; b--) begin
      c = r + (longint'(1) << b);
      if (c * c <= v) r = c;
    end
    return r;
  endfunction

  function automatic logic [19:0] to_bcd5(input longint v);
    logic [19:0] r;
    for (int i = 0; i < 5; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  typedef logic [19:0] y0_tab_t [100:999];

  function automatic y0_tab_t y0_table(input longint num);
    y0_tab_t t;
    for (int d = 100; d <= 999; d++) t[d] = to_bcd5(isqrt(num / longint'(2 * d + 1)));
    return t;
  endfunction

  // Constant ROMs, filled at elaboration.
  localparam y0_tab_t Y0_T15 = y0_table(64'd2000000000000);
  localparam y0_tab_t Y0_T16 = y0_table(64'd200000000000);

  // ---- state ----
  state_e             state;
  logic [2:0]         iter;
  logic [4*P-1:0]     an;         // normalised significand A'
  logic               t16;        // t = 16
  logic [4*MP-1:0]    mh;         // m/2 * 10^F
  logic [4*MP-1:0]    yr;         // y * 10^F
  logic [4*MP-1:0]    sr;         // y^2 * 10^F, rounded up
  logic [4*MP-1:0]    vr;         // (1.5 - u) * 10^F
  logic [4*P-1:0]     qt;         // truncated root
  exp_t               eq;         // exponent of the root's last digit
  exp_t               eideal;     // ideal exponent floor(e/2)
  rmode_e             rm_r;

  // ---- normalisation and start value (combinational, from the input) ----
  logic [4*P-1:0] a_norm;
  exp_t           e_norm;
  logic [19:0]    y0_bcd;
  always_comb begin
    int lza;
    logic [9:0] d;
    lza = P;
    for (int i = 0; i < P; i++)
      if (x.coeff[4*i +: 4] != 4'd0) lza = P - 1 - i;
    a_norm = x.coeff << (4 * lza);
    e_norm = exp_t'(int'(x.exp) - lza);
    d = 10'(100 * a_norm[4*P-1 -: 4]) + 10'(10 * a_norm[4*P-5 -: 4]) + 10'(a_norm[4*P-9 -: 4]);
    // e' even needs t = 16, e' odd needs t = 15
    y0_bcd = (d < 10'd100) ? 20'h0 : e_norm[0] ? Y0_T15[d] : Y0_T16[d];
  end

  // m * 10^F = A' * 10^(t-10)
  logic [4*MP-1:0] mm;
  assign mm = t16 ? ((4*MP)'(an) << 24) : ((4*MP)'(an) << 20);

  // ---- shared multiplier ----
  logic [4*MP-1:0] ma, mb;
  logic [8*MP-1:0] mprod;

  always_comb begin
    unique case (state)
      S_H:     begin ma = (4*MP)'(an); mb = (4*MP)'(5); end
      S_S:     begin ma = yr;          mb = yr;         end
      S_U:     begin ma = mh;          mb = sr;         end
      S_Y:     begin ma = yr;          mb = vr;         end
      S_Q:     begin ma = mm;          mb = yr;         end
      default: begin ma = (4*MP)'(qt); mb = (4*MP)'(qt); end
    endcase
  end

  dec_mult_core #(.P(MP)) u_mult (.a(ma), .b(mb), .prod(mprod));

  // Scaled product rounded up: floor(prod / 10^F) + 1.
  logic [4*MP-1:0] p_up;
  logic            p_up_c;
  bcd_cpa #(.ND(MP)) u_up (.a(mprod[4*F +: 4*MP]), .b('0), .cin(1'b1), .sum(p_up), .cout(p_up_c));

  // 1.5 - u with u rounded up: fixed addend 1.5 * 10^F plus the 9's complement
  // of floor(prod / 10^F), no carry in.
  logic [4*MP-1:0] c15, u9, v_full;
  logic            v_c;
  always_comb begin
    c15 = '0;
    c15[4*F +: 4]     = 4'd1;
    c15[4*(F-1) +: 4] = 4'd5;
    for (int i = 0; i < MP; i++) u9[4*i +: 4] = 4'd9 - mprod[4*(F+i) +: 4];
  end
  bcd_cpa #(.ND(MP)) u_fix (.a(c15), .b(u9), .cin(1'b0), .sum(v_full), .cout(v_c));

  // ---- remainder R = M - Q^2 and its correction ----
  logic [4*MW-1:0] mbig, q9, r_full;
  logic            r_cout;
  always_comb begin
    mbig = t16 ? ((4*MW)'(an) << 64) : ((4*MW)'(an) << 60);
    for (int i = 0; i < MW; i++) q9[4*i +: 4] = 4'd9 - ((i < 2 * P) ? mprod[4*i +: 4] : 4'd0);
  end
  bcd_cpa #(.ND(MW)) u_rem (.a(mbig), .b(q9), .cin(1'b1), .sum(r_full), .cout(r_cout));

  // R <= 2Q + ..., so RW digits hold it.  R - (2Q + 1) decides the correction.
  logic [4*RW-1:0] r0, q2, q2_9, r1, rc, qc9, rq;
  logic            q2_c, gt_2q, rq_c, qinc_c;
  logic [4*P-1:0]  qinc, qc;
  assign r0 = r_full[4*RW-1:0];
  bcd_cpa #(.ND(RW)) u_q2 (.a((4*RW)'(qt)), .b((4*RW)'(qt)), .cin(1'b0), .sum(q2), .cout(q2_c));
  always_comb
    for (int i = 0; i < RW; i++) q2_9[4*i +: 4] = 4'd9 - q2[4*i +: 4];
  // R + (10^RW - 1 - 2Q): carry out means R - 2Q - 1 >= 0
  bcd_cpa #(.ND(RW)) u_rsub (.a(r0), .b(q2_9), .cin(1'b0), .sum(r1), .cout(gt_2q));
  bcd_cpa #(.ND(P))  u_qinc (.a(qt), .b('0), .cin(1'b1), .sum(qinc), .cout(qinc_c));
  assign rc = gt_2q ? r1 : r0;
  assign qc = gt_2q ? qinc : qt;
  always_comb
    for (int i = 0; i < RW; i++) qc9[4*i +: 4] = 4'd9 - ((i < P) ? qc[4*i +: 4] : 4'd0);
  // R - Q - 1 >= 0 means R > Q: above one half
  bcd_cpa #(.ND(RW)) u_half (.a(rc), .b(qc9), .cin(1'b0), .sum(rq), .cout(rq_c));

  // ---- final rounding ----
  logic [4*(P+1)-1:0] rcoeff;
  exp_t               rexp;
  dfp_t               rres;
  dfp_flags_t         rflags;
  always_comb begin
    int tz, sh;
    logic rzero;
    rzero = (rc == '0);
    tz = P;
    for (int i = P - 1; i >= 0; i--)
      if (qc[4*i +: 4] != 4'd0) tz = i;
    sh = 0;
    if (rzero && eq < eideal) sh = (int'(eideal) - int'(eq) < tz) ? int'(eideal) - int'(eq) : tz;
    if (rzero) begin
      rcoeff = (4*(P+1))'(qc >> (4 * sh));
      rexp   = exp_t'(int'(eq) + sh);
    end else begin
      rcoeff = {qc, rq_c ? 4'd7 : 4'd2};
      rexp   = exp_t'(int'(eq) - 1);
    end
  end

  dfp_round #(.W(P + 1)) u_round (
    .sign(1'b0), .coeff(rcoeff), .exp_in(rexp), .sticky_in(1'b0),
    .rm(rm_r), .res(rres), .flags(rflags)
  );

  // ---- special operands ----
  logic       special;
  dfp_t       sp_res;
  dfp_flags_t sp_flags;
  always_comb begin
    logic xz;
    xz       = (x.cls == CLS_FINITE) && (x.coeff == '0);
    special  = 1'b1;
    sp_res   = '0;
    sp_flags = '0;
    if (is_nan(x)) begin
      sp_res     = x;
      sp_res.cls = CLS_QNAN;
      sp_res.exp = '0;
      sp_flags.invalid = (x.cls == CLS_SNAN);
    end else if (xz) begin
      sp_res.sign = x.sign;
      sp_res.exp  = x.exp >>> 1;
    end else if (x.sign) begin
      sp_res = qnan(1'b0);
      sp_flags.invalid = 1'b1;
    end else if (x.cls == CLS_INF) begin
      sp_res = infinity(1'b0);
    end else begin
      special = 1'b0;
    end
  end

  // ---- sequencing ----
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      iter   <= '0;
      done   <= 1'b0;
      res    <= '0;
      flags  <= '0;
      an     <= '0;
      t16    <= 1'b0;
      mh     <= '0;
      yr     <= '0;
      sr     <= '0;
      vr     <= '0;
      qt     <= '0;
      eq     <= '0;
      eideal <= '0;
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
            t16    <= !e_norm[0];
            yr     <= (4*MP)'(y0_bcd) << (4 * (F - 5));
            eideal <= x.exp >>> 1;
            eq     <= (e_norm - (e_norm[0] ? exp_t'(15) : exp_t'(16))) >>> 1;
            rm_r   <= rm;
            iter   <= '0;
            state  <= S_H;
          end
        end
        S_H: begin
          // m/2 * 10^F = 5 * A' * 10^(t-11)
          mh    <= t16 ? (mprod[4*MP-1:0] << 20) : (mprod[4*MP-1:0] << 16);
          state <= S_S;
        end
        S_S: begin
          sr    <= p_up;
          state <= S_U;
        end
        S_U: begin
          vr    <= v_full;
          state <= S_Y;
        end
        S_Y: begin
          yr    <= mprod[4*F +: 4*MP];
          iter  <= iter + 3'd1;
          state <= (int'(iter) == NIT - 1) ? S_Q : S_S;
        end
        S_Q: begin
          // m * y * 10^15 = mprod / 10^(2F - 15)
          qt    <= mprod[4*(2*F-15) +: 4*P];
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

  // The multiplier is never asked for more digits than it has.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state == S_Y) |-> (mprod[8*MP-1 -: 4*(MP-F)] == '0));

endmodule
