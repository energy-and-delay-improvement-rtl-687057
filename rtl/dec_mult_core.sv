// dec_mult_core: fully parallel BCD significand multiplier (P x P digits).
//
// Produces the exact 2P-digit product of two P-digit BCD integers in one
// combinational pass, in three stages:
//   1. Multiples: the nine multiples 1A..9A are formed once with P+1 digit
//      fast decimal adders (2A=A+A, 3A=2A+A, 4A=2A+2A, 5A=4A+A, 6A=3A+3A,
//      7A=6A+A, 8A=4A+4A, 9A=8A+A).
//   2. Partial products: digit i of B selects one multiple, shifted left by i
//      digits, giving P partial products that are all generated in parallel.
//   3. Reduction: a tree of decimal 3:2 carry-save compressors reduces the
//      partial products to two BCD vectors (sum and carry), without any carry
//      propagation, and the fast decimal adder (bcd_cpa) adds the two.
// The parallel structure, the carry-save tree and the final fast adder follow
// the published multiplier; the choice of multiples and the digit-wise 3:2
// compressor (three digits summed to 0..27, split into a sum digit and a
// carry digit 0..2 for the next position) are this design's own.  All
// arithmetic is modulo 10^(2P), which is exact because the product fits.
module dec_mult_core #(
  parameter int P = 16
) (
  input  logic [4*P-1:0]   a,
  input  logic [4*P-1:0]   b,
  output logic [8*P-1:0]   prod
);

  localparam int MW = P + 1;   // digits of a multiple
  localparam int W  = 2 * P;   // digits of the product

  // Number of vectors after l levels of 3:2 compression.
  function automatic int vec_count(input int n0, input int l);
    int n = n0;
    for (int k = 0; k < l; k++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int level_count(input int n0);
    int n = n0;
    int l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int NL = level_count(P);

  // ---- multiples of A ----
  logic [4*MW-1:0] m1, m2, m3, m4, m5, m6, m7, m8, m9;
  logic            unused_c2, unused_c3, unused_c4, unused_c5, unused_c6, unused_c7, unused_c8, unused_c9;

  assign m1 = {4'h0, a};
  bcd_cpa #(.ND(MW)) u_m2 (.a(m1), .b(m1), .cin(1'b0), .sum(m2), .cout(unused_c2));
  bcd_cpa #(.ND(MW)) u_m3 (.a(m2), .b(m1), .cin(1'b0), .sum(m3), .cout(unused_c3));
  bcd_cpa #(.ND(MW)) u_m4 (.a(m2), .b(m2), .cin(1'b0), .sum(m4), .cout(unused_c4));
  bcd_cpa #(.ND(MW)) u_m5 (.a(m4), .b(m1), .cin(1'b0), .sum(m5), .cout(unused_c5));
  bcd_cpa #(.ND(MW)) u_m6 (.a(m3), .b(m3), .cin(1'b0), .sum(m6), .cout(unused_c6));
  bcd_cpa #(.ND(MW)) u_m7 (.a(m6), .b(m1), .cin(1'b0), .sum(m7), .cout(unused_c7));
  bcd_cpa #(.ND(MW)) u_m8 (.a(m4), .b(m4), .cin(1'b0), .sum(m8), .cout(unused_c8));
  bcd_cpa #(.ND(MW)) u_m9 (.a(m8), .b(m1), .cin(1'b0), .sum(m9), .cout(unused_c9));

  // ---- partial products and carry-save tree ----
  logic [4*W-1:0] red_s, red_c;

  always_comb begin
    logic [4*W-1:0] v  [P];
    logic [4*W-1:0] nv [P];
    logic [4*MW-1:0] sel;
    logic [4:0] t;
    int n;
    red_s = '0;
    red_c = '0;
    t     = '0;
    nv    = '{default: '0};
    for (int i = 0; i < P; i++) begin
      unique case (b[4*i +: 4])
        4'd1:    sel = m1;
        4'd2:    sel = m2;
        4'd3:    sel = m3;
        4'd4:    sel = m4;
        4'd5:    sel = m5;
        4'd6:    sel = m6;
        4'd7:    sel = m7;
        4'd8:    sel = m8;
        4'd9:    sel = m9;
        default: sel = '0;
      endcase
      v[i] = (4*W)'(sel) << (4 * i);
    end
    for (int l = 0; l < NL; l++) begin
      n = vec_count(P, l);
      for (int j = 0; j < P; j++) nv[j] = '0;
      for (int j = 0; j < P / 3; j++) begin
        if (3 * j + 2 < n) begin
          // digit-wise 3:2 compression of v[3j], v[3j+1], v[3j+2]
          for (int d = 0; d < W; d++) begin
            t = 5'(v[3*j][4*d +: 4]) + 5'(v[3*j+1][4*d +: 4]) + 5'(v[3*j+2][4*d +: 4]);
            nv[2*j][4*d +: 4] = (t >= 5'd20) ? 4'(t - 5'd20) : (t >= 5'd10) ? 4'(t - 5'd10) : t[3:0];
            if (d + 1 < W)
              nv[2*j+1][4*(d+1) +: 4] = (t >= 5'd20) ? 4'd2 : (t >= 5'd10) ? 4'd1 : 4'd0;
          end
        end
      end
      for (int j = 0; j < 2; j++)
        if ((n / 3) * 3 + j < n) nv[2 * (n / 3) + j] = v[(n / 3) * 3 + j];
      v = nv;
    end
    red_s = v[0];
    red_c = (P > 1) ? v[1] : '0;
  end

  logic unused_cout;
  bcd_cpa #(.ND(W)) u_final (.a(red_s), .b(red_c), .cin(1'b0), .sum(prod), .cout(unused_cout));

endmodule
