// fp_compare - comparisons (FEQ.S, FLT.S, FLE.S) and FMIN.S / FMAX.S.
//
// Because the exponent is biased, two numbers of the same sign order like
// their magnitudes taken as 31-bit unsigned integers; the sign decides
// otherwise, with +0 and -0 equal. lt/eq are formed that way and give the
// condition bit (bit 0 of the integer result). NaN handling follows RISC-V:
// a comparison with a NaN is false; FEQ raises NV only for a signalling
// NaN, FLT and FLE for any NaN. FMIN/FMAX return the other operand when
// one is NaN and the canonical NaN when both are, treat -0 as smaller than
// +0, and raise NV for a signalling NaN. Combinational.
module fp_compare
  import fpu_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  fpu_op_e     op,       // FOP_EQ, FOP_LT, FOP_LE, FOP_MIN, FOP_MAX
  output logic [31:0] result,
  output fflags_t     flags
);
  fp_unpacked_t ua, ub;
  fp_decoder u_dec_a (.in(a), .out(ua));
  fp_decoder u_dec_b (.in(b), .out(ub));

  logic both_zero, eq, lt, lt_total, any_nan, any_snan;

  always_comb begin
    both_zero = ua.is_zero & ub.is_zero;
    any_nan   = ua.is_nan | ub.is_nan;
    any_snan  = ua.is_snan | ub.is_snan;
    eq = (a == b) | both_zero;
    if (a[31] != b[31])
      lt = a[31] & ~both_zero;
    else if (a[31])
      lt = a[30:0] > b[30:0];
    else
      lt = a[30:0] < b[30:0];
    // ordering used by min/max: -0 below +0
    lt_total = lt | (both_zero & a[31] & ~b[31]);

    result = 32'd0;
    flags  = FLAGS_NONE;
    unique case (op)
      FOP_EQ: begin
        result[0] = ~any_nan & eq;
        flags.nv  = any_snan;
      end
      FOP_LT: begin
        result[0] = ~any_nan & lt;
        flags.nv  = any_nan;
      end
      FOP_LE: begin
        result[0] = ~any_nan & (lt | eq);
        flags.nv  = any_nan;
      end
      default: begin  // FOP_MIN, FOP_MAX
        flags.nv = any_snan;
        if (ua.is_nan && ub.is_nan) result = QNAN;
        else if (ua.is_nan)         result = b;
        else if (ub.is_nan)         result = a;
        else if (op == FOP_MIN)     result = lt_total ? a : b;
        else                        result = lt_total ? b : a;
      end
    endcase
  end
endmodule
