// fp_rounder - rounds a 24-bit significand to the final precision.
//
// Inputs are the significand kept by the normaliser, the round bit (first
// discarded bit), the sticky bit (OR of all later discarded bits), the sign
// of the result and the rounding mode. The increment decision follows the
// five IEEE 754 / RISC-V modes: RNE rounds up when R and (S or LSB), RTZ
// never, RDN when the result is negative and inexact, RUP when positive and
// inexact, RMM when R is set. The output has one extra bit for the carry out
// of an all-ones significand; fp_final_norm renormalises it.
// Purely combinational. Unknown rm values (101, 110) round like RNE; the
// decoder never issues them.
module fp_rounder
  import fpu_pkg::*;
(
  input  logic        sign,
  input  logic [23:0] sig,
  input  logic        rnd,
  input  logic        stk,
  input  rm_t         rm,
  output logic [24:0] sig_out,
  output logic        inexact
);
  logic up;

  always_comb begin
    inexact = rnd | stk;
    unique case (rm)
      RM_RTZ:  up = 1'b0;
      RM_RDN:  up = sign & inexact;
      RM_RUP:  up = ~sign & inexact;
      RM_RMM:  up = rnd;
      default: up = rnd & (stk | sig[0]);
    endcase
    sig_out = {1'b0, sig} + {24'd0, up};
  end
endmodule
