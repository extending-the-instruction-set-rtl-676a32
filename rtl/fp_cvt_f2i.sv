// fp_cvt_f2i - single-precision to integer conversion (FCVT.W.S,
// FCVT.WU.S).
//
// The significand is placed in a fixed-point word with 32 integer and 32
// fraction bits by shifting it according to the unbiased exponent (an
// exponent below -33 leaves only a sticky bit, one above 31 is out of range
// at once). The first fraction bit is the round bit, the OR of the rest the
// sticky bit; the integer magnitude is then rounded with the requested
// mode and the sign applied. Out-of-range results saturate as the RISC-V
// manual specifies and raise NV:
//   signed:   too large or +inf or NaN -> 2^31-1, too small or -inf -> -2^31
//   unsigned: too large or +inf or NaN -> 2^32-1, negative (after
//             rounding) or -inf -> 0
// An in-range inexact result raises NX. Purely combinational.
module fp_cvt_f2i
  import fpu_pkg::*;
(
  input  logic [31:0] in,
  input  logic        is_signed,
  input  rm_t         rm,
  output logic [31:0] result,
  output fflags_t     flags
);
  fp_unpacked_t u;
  fp_decoder u_dec (.in(in), .out(u));

  logic signed [11:0] e_unb, lsh;
  logic [63:0]  fix;
  logic [87:0]  wide;
  logic         rnd, stk, up, big, ovf;
  logic [32:0]  mag;

  always_comb begin
    e_unb = $signed({4'd0, u.exp}) - 12'sd127;
    big   = (e_unb > 12'sd31);
    lsh   = e_unb + 12'sd9;         // 24-bit significand, 23 fraction bits, into 32.32
    fix   = '0;
    wide  = '0;
    if (big) begin
      fix = '0;
    end else if (lsh >= 12'sd0) begin
      fix = {40'd0, u.sig} << lsh;
    end else if (lsh > -12'sd24) begin
      wide = {40'd0, u.sig, 24'd0} >> (-lsh);
      fix  = {wide[87:25], |wide[24:0]};
    end else begin
      fix = {63'd0, |u.sig};
    end
    rnd = fix[31];
    stk = |fix[30:0];
    unique case (rm)
      RM_RTZ:  up = 1'b0;
      RM_RDN:  up = u.sign & (rnd | stk);
      RM_RUP:  up = ~u.sign & (rnd | stk);
      RM_RMM:  up = rnd;
      default: up = rnd & (stk | fix[32]);
    endcase
    mag = {1'b0, fix[63:32]} + {32'd0, up};

    if (is_signed)
      ovf = big || (u.sign ? (mag > 33'h0_8000_0000) : (mag > 33'h0_7FFF_FFFF));
    else
      ovf = big || (u.sign ? (mag != 33'd0) : mag[32]);

    flags = FLAGS_NONE;
    if (u.is_nan || u.is_inf || ovf) begin
      flags.nv = 1'b1;
      if (u.is_nan || !u.sign) result = is_signed ? 32'h7FFF_FFFF : 32'hFFFF_FFFF;
      else                     result = is_signed ? 32'h8000_0000 : 32'h0000_0000;
    end else begin
      flags.nx = rnd | stk;
      result   = u.sign ? (~mag[31:0] + 32'd1) : mag[31:0];
    end
  end
endmodule
