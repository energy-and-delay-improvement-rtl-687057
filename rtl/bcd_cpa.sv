// bcd_cpa: fast multi-digit decimal carry-propagate adder.
//
// Adds two ND-digit BCD numbers and a carry in.  The adder has two paths that
// run side by side, as in the published block diagram of this adder:
//   * Carry path: each operand digit is recoded to excess-3 (digit + 3).  The
//     4-bit binary sum of two excess-3 digits carries out exactly when the
//     decimal digit sum is ten or more (generate), and is 1111 exactly when the
//     decimal digit sum is nine (propagate).  These digit-level G/P signals feed
//     a Kogge-Stone parallel-prefix tree of ceil(log2(ND)) levels that yields
//     the carry into every digit position.
//   * Sum path: the BCD digits are added in binary (0..18); a correction step
//     forms both the decimal sum digit and the incremented sum digit.
// The carry into each position then selects sum or sum+1 in a final mux.
// The operands are already BCD here, so the "convert to BCD" step of that
// diagram is the identity.  Purely combinational; the digit count is a
// parameter of this design.
module bcd_cpa #(
  parameter int ND = 16
) (
  input  logic [4*ND-1:0] a,
  input  logic [4*ND-1:0] b,
  input  logic            cin,
  output logic [4*ND-1:0] sum,
  output logic            cout
);

  localparam int LV = (ND > 1) ? $clog2(ND) : 1;

  logic [ND-1:0] g0, p0;
  logic [4*ND-1:0] s0, s1;   // sum and incremented sum digits

  // Per-digit excess-3 generate/propagate and BCD sum / sum+1.
  always_comb begin
    for (int i = 0; i < ND; i++) begin
      logic [3:0] ax, bx, da, db;
      logic [4:0] xs, bs;
      da = a[4*i +: 4];
      db = b[4*i +: 4];
      ax = da + 4'd3;
      bx = db + 4'd3;
      xs = {1'b0, ax} + {1'b0, bx};
      g0[i] = xs[4];
      p0[i] = (xs[3:0] == 4'hF);
      bs = {1'b0, da} + {1'b0, db};
      s0[4*i +: 4] = (bs >= 5'd10) ? 4'(bs - 5'd10) : bs[3:0];
      s1[4*i +: 4] = (bs >= 5'd9)  ? 4'(bs - 5'd9)  : 4'(bs + 5'd1);
    end
  end

  // Kogge-Stone prefix tree.  After level l, position i holds (G,P) of
  // digits i..max(0, i-2^(l+1)+1).  The carry in is folded into digit 0's
  // generate so that the final G of position i is the carry out of digit i.
  logic [ND-1:0] gk;

  always_comb begin
    logic [ND-1:0] g, p, gn, pn;
    g = g0;
    p = p0;
    g[0] = g0[0] | (p0[0] & cin);
    for (int l = 0; l < LV; l++) begin
      for (int i = 0; i < ND; i++) begin
        if (i >= (1 << l)) begin
          gn[i] = g[i] | (p[i] & g[i - (1 << l)]);
          pn[i] = p[i] & p[i - (1 << l)];
        end else begin
          gn[i] = g[i];
          pn[i] = p[i];
        end
      end
      g = gn;
      p = pn;
    end
    gk = g;
  end

  // Carry into digit i, then select sum or sum+1.
  logic [ND-1:0] cdig;
  assign cdig = {gk[ND-2:0], cin};

  always_comb begin
    for (int i = 0; i < ND; i++)
      sum[4*i +: 4] = cdig[i] ? s1[4*i +: 4] : s0[4*i +: 4];
  end

  assign cout = gk[ND-1];

endmodule
