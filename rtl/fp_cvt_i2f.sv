// fp_cvt_i2f - integer to single-precision conversion (FCVT.S.W,
// FCVT.S.WU).
//
// The magnitude of the operand is taken (two's complement negation for a
// negative signed operand), shifted left until its MSB is 1 and the shift
// count sets the exponent: 127 + 31 - leading zeros. The top 24 bits form
// the significand, the next bit is the round bit and the rest the sticky
// bit; fp_rounder and fp_final_norm round with the requested mode (a
// 32-bit integer can never overflow binary32). The sign is the operand's
// sign for FCVT.S.W and 0 for FCVT.S.WU. Zero converts to +0.
// Purely combinational.
module fp_cvt_i2f
  import fpu_pkg::*;
(
  input  logic [31:0] in,
  input  logic        is_signed,
  input  rm_t         rm,
  output logic [31:0] result,
  output fflags_t     flags
);
  logic        sign;
  logic [31:0] mag, norm;
  logic [5:0]  lz;
  logic [9:0]  exp;
  logic [24:0] r_sig;
  logic        r_nx;
  logic [31:0] fin_res;
  fflags_t     fin_flags;

  always_comb begin
    sign = is_signed & in[31];
    mag  = sign ? (~in + 32'd1) : in;
    lz   = 6'd32;
    for (int i = 0; i < 32; i++)
      if (mag[i]) lz = 6'(31 - i);
    norm = mag << lz[4:0];
    exp  = 10'd158 - {4'd0, lz};
  end

  fp_rounder u_round (
    .sign(sign), .sig(norm[31:8]), .rnd(norm[7]), .stk(|norm[6:0]), .rm(rm),
    .sig_out(r_sig), .inexact(r_nx)
  );

  fp_final_norm u_final (
    .sign(sign), .exp(exp), .sig(r_sig), .inexact(r_nx), .rm(rm),
    .result(fin_res), .flags(fin_flags)
  );

  always_comb begin
    if (mag == 32'd0) begin
      result = 32'd0;
      flags  = FLAGS_NONE;
    end else begin
      result = fin_res;
      flags  = fin_flags;
    end
  end
endmodule
