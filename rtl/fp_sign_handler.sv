// fp_sign_handler - sign of the result of the multiply/divide/square-root
// unit.
//
// Multiply and divide: the XOR of the operand signs. Square root: the sign
// of the operand, which only survives for -0 (sqrt(-0) = -0); a negative
// non-zero operand is caught as an invalid operation by the special-case
// logic of fp_mds. sqrt_neg flags that case. Purely combinational.
module fp_sign_handler
  import fpu_pkg::*;
(
  input  mds_op_e op,
  input  logic    sa,
  input  logic    sb,
  output logic    sign,
  output logic    sqrt_neg
);
  always_comb begin
    sign     = (op == MDS_SQRT) ? sa : (sa ^ sb);
    sqrt_neg = (op == MDS_SQRT) & sa;
  end
endmodule
