// fp_classify - FCLASS.S.
//
// Writes a 10-bit one-hot mask to the integer destination: bit 0 -inf,
// 1 negative normal, 2 negative subnormal, 3 -0, 4 +0, 5 positive
// subnormal, 6 positive normal, 7 +inf, 8 signalling NaN, 9 quiet NaN.
// Raises no flags. Combinational.
module fp_classify
  import fpu_pkg::*;
(
  input  logic [31:0] a,
  output logic [31:0] result
);
  fp_unpacked_t u;
  fp_decoder u_dec (.in(a), .out(u));

  logic normal;
  always_comb begin
    normal = ~u.is_zero & ~u.is_sub & ~u.is_inf & ~u.is_nan;
    result = 32'd0;
    result[0] =  u.sign & u.is_inf;
    result[1] =  u.sign & normal;
    result[2] =  u.sign & u.is_sub;
    result[3] =  u.sign & u.is_zero;
    result[4] = ~u.sign & u.is_zero;
    result[5] = ~u.sign & u.is_sub;
    result[6] = ~u.sign & normal;
    result[7] = ~u.sign & u.is_inf;
    result[8] =  u.is_snan;
    result[9] =  u.is_nan & ~u.is_snan;
  end
endmodule
