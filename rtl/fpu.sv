// fpu - floating-point execute unit.
//
// Receives one operation with its two operands (already selected from the
// FP or integer bank) and a resolved rounding mode, and routes it to the
// unit that executes it: fp_addsub (FADD/FSUB), fp_mds (FMUL/FDIV/FSQRT),
// fp_compare (FEQ/FLT/FLE/FMIN/FMAX), fp_sgnj, fp_classify, fp_cvt_f2i,
// fp_cvt_i2f. FMV.X.W and FMV.W.X need no unit: operand a is passed on
// unchanged.
//
// Timing: start is a one-cycle request. For every operation except
// multiply, divide and square root the result is combinational and done is
// asserted in the start cycle. For those three, start launches fp_mds,
// busy is high until it finishes and done is asserted with the result
// 4 (multiply) or 28 (divide, square root) cycles later. The host must hold
// further requests while busy is high (the pipeline stall).
module fpu
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  fpu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  rm_t         rm,
  output logic        busy,
  output logic        done,
  output logic [31:0] result,
  output fflags_t     flags
);
  logic [31:0] r_add, r_mds, r_cmp, r_sgnj, r_cls, r_f2i, r_i2f;
  fflags_t     f_add, f_mds, f_cmp, f_f2i, f_i2f;
  logic        is_mds, mds_busy, mds_ready;
  mds_op_e     mds_op;

  always_comb begin
    is_mds = (op == FOP_MUL) || (op == FOP_DIV) || (op == FOP_SQRT);
    unique case (op)
      FOP_DIV:  mds_op = MDS_DIV;
      FOP_SQRT: mds_op = MDS_SQRT;
      default:  mds_op = MDS_MUL;
    endcase
  end

  fp_addsub u_addsub (
    .a(a), .b(b), .sub(op == FOP_SUB), .rm(rm), .result(r_add), .flags(f_add)
  );

  fp_mds u_mds (
    .clk(clk), .rst_n(rst_n), .start(start && is_mds && !mds_busy), .op(mds_op),
    .a(a), .b(b), .rm(rm), .busy(mds_busy), .ready(mds_ready),
    .result(r_mds), .flags(f_mds)
  );

  fp_compare u_cmp (.a(a), .b(b), .op(op), .result(r_cmp), .flags(f_cmp));

  fp_sgnj u_sgnj (
    .a(a), .b(b),
    .mode((op == FOP_SGNJ) ? 2'b00 : (op == FOP_SGNJN) ? 2'b01 : 2'b10),
    .result(r_sgnj)
  );

  fp_classify u_cls (.a(a), .result(r_cls));

  fp_cvt_f2i u_f2i (
    .in(a), .is_signed(op == FOP_CVT_WS), .rm(rm), .result(r_f2i), .flags(f_f2i)
  );

  fp_cvt_i2f u_i2f (
    .in(a), .is_signed(op == FOP_CVT_SW), .rm(rm), .result(r_i2f), .flags(f_i2f)
  );

  always_comb begin
    result = 32'd0;
    flags  = FLAGS_NONE;
    done   = 1'b0;
    if (mds_ready) begin
      result = r_mds;
      flags  = f_mds;
      done   = 1'b1;
    end else if (start && !mds_busy) begin
      done = !is_mds && (op != FOP_NONE);
      unique case (op)
        FOP_ADD, FOP_SUB: begin result = r_add; flags = f_add; end
        FOP_MIN, FOP_MAX, FOP_EQ, FOP_LT, FOP_LE: begin result = r_cmp; flags = f_cmp; end
        FOP_SGNJ, FOP_SGNJN, FOP_SGNJX: result = r_sgnj;
        FOP_CLASS: result = r_cls;
        FOP_CVT_WS, FOP_CVT_WUS: begin result = r_f2i; flags = f_f2i; end
        FOP_CVT_SW, FOP_CVT_SWU: begin result = r_i2f; flags = f_i2f; end
        FOP_MV_XW, FOP_MV_WX: result = a;
        default: ;
      endcase
    end
  end

  assign busy = mds_busy;
endmodule
