// dpd_pack64: encodes the units' internal form (class, sign, exponent of the
// last digit, 16 BCD digits) into an IEEE 754-2008 decimal64 word in the
// densely packed decimal (DPD) encoding.
//
// The biased exponent is exp + 398 (10 bits).  A leading digit below 8 goes
// into G[2:0] with the exponent MSBs in G[4:3]; a leading digit of 8 or 9 gives
// G = {11, exponent MSBs, digit LSB}.  The 15 trailing digits are compressed,
// three at a time, into declets by dfp_pkg::bcd_to_dpd.  Infinity is
// G = 11110 with all following bits zero; a NaN is G = 11111, bit 57 set for a
// signalling NaN, and keeps the trailing 15 digits as payload.  The input is
// expected in range (ETINY <= exp <= EQMAX), as the units produce it.
// Combinational.  The encoding is the standard's.
module dpd_pack64
  import dfp_pkg::*;
(
  input  dfp_t        d,
  output logic [63:0] w
);

  always_comb begin
    logic [9:0] be;
    logic [3:0] msd;
    be  = 10'(d.exp + exp_t'(BIAS));
    msd = d.coeff[4*P-1 -: 4];
    w   = '0;
    w[63] = d.sign;
    unique case (d.cls)
      CLS_INF:  w[62:58] = 5'b11110;
      CLS_QNAN, CLS_SNAN: begin
        w[62:58] = 5'b11111;
        w[57]    = (d.cls == CLS_SNAN);
        for (int i = 0; i < 5; i++) w[10*i +: 10] = bcd_to_dpd(d.coeff[12*i +: 12]);
      end
      default: begin
        w[62:58] = msd[3] ? {2'b11, be[9:8], msd[0]} : {be[9:8], msd[2:0]};
        w[57:50] = be[7:0];
        for (int i = 0; i < 5; i++) w[10*i +: 10] = bcd_to_dpd(d.coeff[12*i +: 12]);
      end
    endcase
  end

endmodule
