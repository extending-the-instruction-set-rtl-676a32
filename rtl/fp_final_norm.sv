// fp_final_norm - final normaliser and result packer.
//
// Takes the biased exponent from the pre-rounding normaliser (0 means the
// significand is subnormal and carries weight 2^-126) and the rounded 25-bit
// significand. A carry out of rounding shifts the significand right by one
// and increments the exponent; a subnormal that rounds up into bit 23
// becomes the smallest normal number. Exponents of 255 or more overflow:
// the result is infinity or the largest finite number depending on the
// rounding mode and sign, with OF and NX set. UF is raised for an inexact
// result whose exponent field ends up zero (tininess detected after
// rounding, using the packed exponent - this design's simplification).
// Purely combinational.
module fp_final_norm
  import fpu_pkg::*;
(
  input  logic        sign,
  input  logic [9:0]  exp,       // biased, unsigned, 0 = subnormal
  input  logic [24:0] sig,       // rounded significand, carry at [24]
  input  logic        inexact,
  input  rm_t         rm,
  output logic [31:0] result,
  output fflags_t     flags
);
  logic [9:0]  e;
  logic [23:0] s;
  logic        to_inf;

  always_comb begin
    if (sig[24]) begin
      s = sig[24:1];
      e = exp + 10'd1;
    end else begin
      s = sig[23:0];
      e = (exp == 10'd0 && sig[23]) ? 10'd1 : exp;
    end

    unique case (rm)
      RM_RTZ:  to_inf = 1'b0;
      RM_RDN:  to_inf = sign;
      RM_RUP:  to_inf = ~sign;
      default: to_inf = 1'b1;
    endcase

    flags = FLAGS_NONE;
    flags.nx = inexact;
    if (e >= 10'd255) begin
      result   = to_inf ? {sign, 8'hFF, 23'd0} : {sign, 8'hFE, 23'h7FFFFF};
      flags.of = 1'b1;
      flags.nx = 1'b1;
    end else begin
      result   = {sign, e[7:0], s[22:0]};
      flags.uf = inexact & (e == 10'd0);
    end
  end
endmodule
