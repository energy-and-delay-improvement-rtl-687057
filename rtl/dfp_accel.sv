// dfp_accel: decimal floating-point accelerator as a memory-mapped slave on a
// 32-bit Avalon-MM bus, the way the units are attached to a host processor.
//
// The host writes up to three decimal64 operands (DPD-encoded, IEEE
// 754-2008), each as two 32-bit words, then writes the control word, which
// starts the operation.  It polls the status word until done is set and reads
// the 64-bit result and the exception flags.  Inside, the operand registers
// are decoded by dpd_unpack64 and feed all units at once: the adder/subtractor
// (dfp_add), the multiplier (dfp_mul), the fused multiply-add (dfp_fma) and
// the Newton-Raphson divider (dfp_div) and square root (dfp_sqrt, on operand
// A).  The result of the selected unit is
// encoded by dpd_pack64 into the result register.
//
// Register map (word addresses):
//   0/1  A low/high      2/3  B low/high      4/5  C low/high   (read/write)
//   6    CTRL  (write)   [2:0] operation: 0 A+B, 1 A-B, 2 A*B, 3 FMA, 4 A/B,
//                        5 sqrt(A)
//                        [5:3] rounding direction (dfp_pkg::rmode_e)
//                        [6] FMA: negate the product  [7] FMA: negate C
//        (read)          the last control word
//   7    STATUS (read)   [0] busy  [1] done  [6:2] flags {invalid, division
//                        by zero, overflow, underflow, inexact}
//   8/9  R low/high      result (read only)
// Timing: zero wait states, read data valid in the cycle of the read.  The
// add, subtract, multiply and FMA units are combinational; their result is
// registered at the clock edge after the one that takes the control write,
// and done is set there.  A division sets done 2*NIT+4 edges after the
// control write, a square root 3*NIT+5 edges after it (two edges for special
// operands such as a zero divisor or a negative root).  A control write while
// busy is ignored; done is cleared by the next control write.
// The bus attachment and the multi-cycle operand transfer follow the FPGA
// evaluation system the units were measured in; the register map, the
// control and status encoding and the timing are this design's own.
module dfp_accel
  import dfp_pkg::*;
#(
  parameter int NIT = 3    // Newton-Raphson iterations of the divider
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata
);

  localparam logic [3:0] A_LO = 4'd0, A_HI = 4'd1, B_LO = 4'd2, B_HI = 4'd3,
                         C_LO = 4'd4, C_HI = 4'd5, CTRL = 4'd6, STATUS = 4'd7,
                         R_LO = 4'd8, R_HI = 4'd9;

  typedef struct packed {
    logic       neg_c;
    logic       neg_p;
    rmode_e     rm;
    dfp_op_e    op;
  } ctrl_t;

  logic [63:0] reg_a, reg_b, reg_c, reg_r;
  ctrl_t       ctrl;
  dfp_flags_t  reg_flags;
  logic        busy, done, exec, seq_wait;

  // ---- units ----
  dfp_t       ua, ub, uc;
  dfp_t       r_add, r_mul, r_fma, r_div, r_sqrt, r_sel;
  dfp_flags_t f_add, f_mul, f_fma, f_div, f_sqrt, f_sel;
  logic       div_start, div_busy, div_done, sqrt_start, sqrt_busy, sqrt_done;
  logic       seq_op;
  logic [63:0] r_packed;

  dpd_unpack64 u_ua (.w(reg_a), .d(ua));
  dpd_unpack64 u_ub (.w(reg_b), .d(ub));
  dpd_unpack64 u_uc (.w(reg_c), .d(uc));

  dfp_add u_add (.x(ua), .y(ub), .sub(ctrl.op == OP_SUB), .rm(ctrl.rm), .res(r_add), .flags(f_add));
  dfp_mul u_mul (.x(ua), .y(ub), .rm(ctrl.rm), .res(r_mul), .flags(f_mul));
  dfp_fma u_fma (.x(ua), .y(ub), .z(uc), .neg_p(ctrl.neg_p), .neg_c(ctrl.neg_c),
                 .rm(ctrl.rm), .res(r_fma), .flags(f_fma));
  dfp_div #(.NIT(NIT)) u_div (.clk(clk), .rst_n(rst_n), .start(div_start), .x(ua), .y(ub),
                              .rm(ctrl.rm), .busy(div_busy), .done(div_done),
                              .res(r_div), .flags(f_div));
  dfp_sqrt #(.NIT(NIT)) u_sqrt (.clk(clk), .rst_n(rst_n), .start(sqrt_start), .x(ua),
                                .rm(ctrl.rm), .busy(sqrt_busy), .done(sqrt_done),
                                .res(r_sqrt), .flags(f_sqrt));

  always_comb begin
    unique case (ctrl.op)
      OP_ADD, OP_SUB: begin r_sel = r_add; f_sel = f_add; end
      OP_MUL:         begin r_sel = r_mul; f_sel = f_mul; end
      OP_FMA:         begin r_sel = r_fma; f_sel = f_fma; end
      OP_SQRT:        begin r_sel = r_sqrt; f_sel = f_sqrt; end
      default:        begin r_sel = r_div; f_sel = f_div; end
    endcase
  end

  dpd_pack64 u_pack (.d(r_sel), .w(r_packed));

  // division and square root take several cycles; the rest are combinational
  assign seq_op     = (ctrl.op == OP_DIV) || (ctrl.op == OP_SQRT);
  assign div_start  = exec && (ctrl.op == OP_DIV);
  assign sqrt_start = exec && (ctrl.op == OP_SQRT);
  assign busy       = exec || seq_wait;

  // ---- registers and sequencing ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a     <= '0;
      reg_b     <= '0;
      reg_c     <= '0;
      reg_r     <= '0;
      ctrl      <= '0;
      reg_flags <= '0;
      done      <= 1'b0;
      exec      <= 1'b0;
      seq_wait  <= 1'b0;
    end else begin
      exec <= 1'b0;
      if (avs_write) begin
        unique case (avs_address)
          A_LO: reg_a[31:0]  <= avs_writedata;
          A_HI: reg_a[63:32] <= avs_writedata;
          B_LO: reg_b[31:0]  <= avs_writedata;
          B_HI: reg_b[63:32] <= avs_writedata;
          C_LO: reg_c[31:0]  <= avs_writedata;
          C_HI: reg_c[63:32] <= avs_writedata;
          CTRL: if (!busy) begin
            ctrl <= ctrl_t'(avs_writedata[$bits(ctrl_t)-1:0]);
            done <= 1'b0;
            exec <= 1'b1;
          end
          default: ;
        endcase
      end
      if (exec) begin
        if (seq_op) begin
          seq_wait <= 1'b1;
        end else begin
          reg_r     <= r_packed;
          reg_flags <= f_sel;
          done      <= 1'b1;
        end
      end
      if (seq_wait && (div_done || sqrt_done)) begin
        reg_r     <= r_packed;
        reg_flags <= f_sel;
        done      <= 1'b1;
        seq_wait  <= 1'b0;
      end
    end
  end

  always_comb begin
    unique case (avs_address)
      A_LO:    avs_readdata = reg_a[31:0];
      A_HI:    avs_readdata = reg_a[63:32];
      B_LO:    avs_readdata = reg_b[31:0];
      B_HI:    avs_readdata = reg_b[63:32];
      C_LO:    avs_readdata = reg_c[31:0];
      C_HI:    avs_readdata = reg_c[63:32];
      CTRL:    avs_readdata = 32'(ctrl);
      STATUS:  avs_readdata = {25'd0, reg_flags, done, busy};
      R_LO:    avs_readdata = reg_r[31:0];
      R_HI:    avs_readdata = reg_r[63:32];
      default: avs_readdata = '0;
    endcase
  end

  // Bus rule: a slave port sees either a read or a write in a cycle.
  a_rw_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(avs_read && avs_write));
  // The divider is started only when it is idle.
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
  a_sqrt_idle: assert property (@(posedge clk) disable iff (!rst_n) sqrt_start |-> !sqrt_busy);

endmodule
