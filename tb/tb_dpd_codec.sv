// tb_dpd_codec: self-checking test of the decimal64 DPD packer and unpacker.
// Checks published decimal64 bit patterns (+1, -1, 10, the largest finite
// number, infinity, quiet and signalling NaN) in both directions, decodes all
// 1024 declet codes and checks that every digit is a valid BCD digit and that
// the redundant codes of 999 decode alike, and packs
// then unpacks random finite numbers and checks the round trip.
module tb_dpd_codec;
  import dfp_pkg::*;
  import dfp_ref_pkg::*;

  logic [63:0] w_in, w_out;
  dfp_t d_in, d_out;
  int checks = 0, failures = 0;

  dpd_unpack64 u_unpack (.w(w_in), .d(d_out));
  dpd_pack64   u_pack   (.d(d_in), .w(w_out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_pair(input logic [63:0] w, input dfp_class_e c, input logic s,
                             input int e, input logic [63:0] coeff);
    dfp_t d;
    d = '0; d.cls = c; d.sign = s; d.exp = exp_t'(e); d.coeff = coeff;
    w_in = w; d_in = d;
    #1;
    checks += 2;
    if (d_out != d) begin
      failures++;
      $display("FAIL unpack %h: got %0d/%0d/%0d/%h", w, d_out.cls, d_out.sign, d_out.exp, d_out.coeff);
    end
    if (w_out != w) begin
      failures++;
      $display("FAIL pack: got %h expected %h", w_out, w);
    end
  endtask

  initial begin
    expect_pair(64'h2238000000000001, CLS_FINITE, 0, 0, 64'h1);
    expect_pair(64'hA238000000000001, CLS_FINITE, 1, 0, 64'h1);
    expect_pair(64'h2238000000000010, CLS_FINITE, 0, 0, 64'h10);
    expect_pair(64'h2238000000000079, CLS_FINITE, 0, 0, 64'h79);
    expect_pair(64'h22380000000000FF, CLS_FINITE, 0, 0, 64'h999);
    expect_pair(64'h77FCFF3FCFF3FCFF, CLS_FINITE, 0, 369, 64'h9999999999999999);
    expect_pair(64'h7800000000000000, CLS_INF, 0, 0, 64'h0);
    expect_pair(64'hF800000000000000, CLS_INF, 1, 0, 64'h0);
    expect_pair(64'h7C00000000000000, CLS_QNAN, 0, 0, 64'h0);
    expect_pair(64'h7E00000000000000, CLS_SNAN, 0, 0, 64'h0);
    // every declet decodes to valid digits, and the four codes xxFF (the
    // canonical 0x0FF and its redundant forms) all decode to 999
    for (int c = 0; c < 1024; c++) begin
      w_in = 64'h2238000000000000 | 64'(c);
      #1;
      checks++;
      if (d_out.coeff[3:0] > 9 || d_out.coeff[7:4] > 9 || d_out.coeff[11:8] > 9) begin
        failures++;
        $display("FAIL declet %h -> %h", c, d_out.coeff[11:0]);
      end
      if ((c & 10'h0FF) == 10'h0FF && d_out.coeff[11:0] != 12'h999) begin
        failures++;
        $display("FAIL redundant 999 declet %h", c);
      end
    end
    // round trip of random finite numbers, with an integer check of the value
    for (int k = 0; k < 3000; k++) begin
      d_in = '0;
      d_in.cls = CLS_FINITE;
      d_in.sign = 1'($urandom);
      d_in.exp = exp_t'($urandom_range(0, 767) + ETINY);
      d_in.coeff = rand_coeff();
      #1;
      w_in = w_out;
      #1;
      checks++;
      if (d_out != d_in || bcd2big((4*MAXD)'(d_out.coeff), P) != bcd2big((4*MAXD)'(d_in.coeff), P)) begin
        failures++;
        if (failures < 10) $display("FAIL round trip %h", w_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
