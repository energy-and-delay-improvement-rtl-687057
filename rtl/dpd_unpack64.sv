// dpd_unpack64: decodes an IEEE 754-2008 decimal64 interchange word in the
// densely packed decimal (DPD) encoding into the units' internal form.
//
// Word layout: bit 63 sign, bits 62:58 combination field G, bits 57:50
// exponent continuation, bits 49:0 five 10-bit declets (15 trailing digits).
// If G[4:3] != 11 the two exponent MSBs are G[4:3] and the leading digit is
// G[2:0]; otherwise the exponent MSBs are G[2:1] and the leading digit is
// 8 + G[0].  G = 11110 is infinity, G = 11111 a NaN (signalling when bit 57
// is set), whose payload is the trailing significand.  The 10-bit biased
// exponent minus 398 gives the exponent of the last digit.  Each declet is
// expanded to three BCD digits by dfp_pkg::dpd_to_bcd.  Combinational.
// The encoding is the standard's; the internal form is this design's own.
module dpd_unpack64
  import dfp_pkg::*;
(
  input  logic [63:0] w,
  output dfp_t        d
);

  always_comb begin
    logic [4:0]  g;
    logic [1:0]  emsb;
    logic [3:0]  msd;
    g    = w[62:58];
    emsb = (g[4:3] != 2'b11) ? g[4:3] : g[2:1];
    msd  = (g[4:3] != 2'b11) ? {1'b0, g[2:0]} : {3'b100, g[0]};
    d       = '0;
    d.sign  = w[63];
    for (int i = 0; i < 5; i++)
      d.coeff[12*i +: 12] = dpd_to_bcd(w[10*i +: 10]);
    if (g[4:1] == 4'b1111) begin
      d.cls = g[0] ? (w[57] ? CLS_SNAN : CLS_QNAN) : CLS_INF;
      if (!g[0]) d.coeff = '0;
    end else begin
      d.cls = CLS_FINITE;
      d.coeff[4*P-1 -: 4] = msd;
      d.exp = exp_t'({emsb, w[57:50]}) - exp_t'(BIAS);
    end
  end

endmodule
