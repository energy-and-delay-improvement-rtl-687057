// tb_bcd_cpa: self-checking test of the fast decimal carry-propagate adder.
// Random and corner-case (all nines, long carry chains) BCD operands are added
// with both carry-in values; the expected sum and carry out are computed with
// binary integer arithmetic.  The adder is combinational, so each result is
// checked one time step after the inputs change.
module tb_bcd_cpa;
  import dfp_ref_pkg::*;

  localparam int ND = 16;
  logic [4*ND-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  bcd_cpa #(.ND(ND)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    big_t ea, eb, es;
    ea = bcd2big((4*MAXD)'(a), ND);
    eb = bcd2big((4*MAXD)'(b), ND);
    es = ea + eb + big_t'(cin);
    #1;
    checks++;
    if (sum != big2bcd(es % pow10(ND))[4*ND-1:0] || cout != (es >= pow10(ND))) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%0d sum=%h cout=%0d", a, b, cin, sum, cout);
    end
  endtask

  function automatic logic [4*ND-1:0] rnd();
    logic [4*ND-1:0] r;
    for (int i = 0; i < ND; i++) r[4*i +: 4] = 4'($urandom_range(0, 9));
    return r;
  endfunction

  initial begin
    for (int k = 0; k < 4000; k++) begin
      a = rnd(); b = rnd(); cin = 1'($urandom);
      case (k % 5)
        1: b = '0;
        2: begin  // b = 99..9 - a (all propagate), carry chain over all digits
          for (int i = 0; i < ND; i++) b[4*i +: 4] = 4'(9 - a[4*i +: 4]);
        end
        3: begin a = {ND{4'h9}}; end
        default: ;
      endcase
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
