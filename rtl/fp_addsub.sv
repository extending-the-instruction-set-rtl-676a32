// fp_addsub - single-precision adder/subtracter (FADD.S, FSUB.S).
//
// Subtraction is turned into addition by inverting the sign of operand B.
// The operands are ordered by magnitude (exponent, then significand); the
// exponent difference is the right-shift applied to the smaller
// significand, which is carried with three extra bits (guard, round and
// sticky, the bits shifted past the last one being ORed into the lowest).
// The aligned significands are added, or subtracted smaller from larger
// when the effective signs differ. fp_norm then shifts a carry out right
// or removes leading zeros, fp_rounder rounds and fp_final_norm handles the
// rounding carry, overflow and packing.
// Special operands: NaN inputs give the canonical quiet NaN (NV for a
// signalling NaN), inf - inf gives NaN with NV, infinity dominates finite
// values. An exact zero sum is +0, or -0 when rounding down (and -0 + -0
// is -0), as IEEE 754 requires.
// Purely combinational: the result is valid in the cycle the operands are.
module fp_addsub
  import fpu_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,     // 1: a - b
  input  rm_t         rm,
  output logic [31:0] result,
  output fflags_t     flags
);
  fp_unpacked_t ua, ub;
  fp_decoder u_dec_a (.in(a), .out(ua));
  fp_decoder u_dec_b (.in(b), .out(ub));

  logic        sb, swap, eff_sub, s_big;
  logic [7:0]  e_big, e_small, ediff;
  logic [23:0] m_big, m_small;
  logic [26:0] al_big, al_small;
  logic [53:0] shifted;
  logic [27:0] sum;
  logic [31:0] fin_result;
  fflags_t     fin_flags;

  logic [9:0]  n_exp;
  logic [23:0] n_sig;
  logic        n_rnd, n_stk;
  logic [24:0] r_sig;
  logic        r_nx;

  always_comb begin
    sb   = ub.sign ^ sub;
    swap = (ub.exp > ua.exp) || ((ub.exp == ua.exp) && (ub.sig > ua.sig));
    s_big   = swap ? sb     : ua.sign;
    e_big   = swap ? ub.exp : ua.exp;
    e_small = swap ? ua.exp : ub.exp;
    m_big   = swap ? ub.sig : ua.sig;
    m_small = swap ? ua.sig : ub.sig;
    ediff   = e_big - e_small;
    eff_sub = ua.sign ^ sb;

    al_big  = {m_big, 3'b000};
    shifted = {m_small, 3'b000, 27'd0} >> ((ediff > 8'd27) ? 8'd27 : ediff);
    al_small = {shifted[53:28], shifted[27] | (|shifted[26:0])};
    if (ediff > 8'd27) al_small = {26'd0, |m_small};

    sum = eff_sub ? ({1'b0, al_big} - {1'b0, al_small})
                  : ({1'b0, al_big} + {1'b0, al_small});
  end

  fp_norm #(.IW(28)) u_norm (
    .sig_in(sum), .exp_in({4'd0, e_big}), .sticky_in(1'b0),
    .exp_out(n_exp), .sig_out(n_sig), .rnd(n_rnd), .stk(n_stk)
  );

  fp_rounder u_round (
    .sign(s_big), .sig(n_sig), .rnd(n_rnd), .stk(n_stk), .rm(rm),
    .sig_out(r_sig), .inexact(r_nx)
  );

  fp_final_norm u_final (
    .sign(s_big), .exp(n_exp), .sig(r_sig), .inexact(r_nx), .rm(rm),
    .result(fin_result), .flags(fin_flags)
  );

  always_comb begin
    result = fin_result;
    flags  = fin_flags;
    if (ua.is_nan || ub.is_nan) begin
      result   = QNAN;
      flags    = FLAGS_NONE;
      flags.nv = ua.is_snan | ub.is_snan;
    end else if (ua.is_inf && ub.is_inf && eff_sub) begin
      result   = QNAN;
      flags    = FLAGS_NONE;
      flags.nv = 1'b1;
    end else if (ua.is_inf) begin
      result = {ua.sign, 8'hFF, 23'd0};
      flags  = FLAGS_NONE;
    end else if (ub.is_inf) begin
      result = {sb, 8'hFF, 23'd0};
      flags  = FLAGS_NONE;
    end else if (sum == 28'd0) begin
      // exact zero: equal magnitudes cancelled, or both operands zero
      result = {(eff_sub ? (rm == RM_RDN) : ua.sign), 31'd0};
      flags  = FLAGS_NONE;
    end
  end
endmodule
