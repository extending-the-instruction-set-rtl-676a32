// fp_decoder - unpacks one IEEE 754 binary32 operand.
//
// Splits the word into sign, exponent and a 24-bit significand. The hidden
// bit is 1 for normal numbers and 0 when the exponent field is zero; for
// subnormals (and zero) the exponent is reported as 1, the minimum normal
// exponent, so that the significand keeps its weight. Zero, subnormal,
// infinity, NaN and signalling NaN indications are derived from the
// "exponent all zeros / all ones" and "mantissa zero" conditions.
// Purely combinational. Two instances are used per two-operand unit.
module fp_decoder
  import fpu_pkg::*;
(
  input  logic [31:0]  in,
  output fp_unpacked_t out
);
  logic exp_zero, exp_ones, man_zero;

  always_comb begin
    exp_zero = (in[30:23] == 8'h00);
    exp_ones = (in[30:23] == 8'hFF);
    man_zero = (in[22:0] == 23'h0);

    out.sign    = in[31];
    out.exp     = exp_zero ? 8'd1 : in[30:23];
    out.sig     = {~exp_zero, in[22:0]};
    out.is_zero = exp_zero & man_zero;
    out.is_sub  = exp_zero & ~man_zero;
    out.is_inf  = exp_ones & man_zero;
    out.is_nan  = exp_ones & ~man_zero;
    out.is_snan = exp_ones & ~man_zero & ~in[22];
  end
endmodule
