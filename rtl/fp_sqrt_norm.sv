// fp_sqrt_norm - normaliser of the square-root path ("sqrtNorm").
//
// The radicand is built from a normalised significand, so the 27-bit root
// always has its leading one in bit 26 and the result exponent of a square
// root is always in the normal range: no shifting is needed. The block
// takes the 24 significand bits, the round bit and the sticky bit (the two
// lowest root bits ORed with the non-zero-remainder flag) and passes the
// exponent on. Purely combinational.
module fp_sqrt_norm (
  input  logic [26:0]        root,
  input  logic               rem_nz,
  input  logic signed [11:0] exp_in,
  output logic [9:0]         exp_out,
  output logic [23:0]        sig_out,
  output logic               rnd,
  output logic               stk
);
  always_comb begin
    exp_out = exp_in[9:0];
    sig_out = root[26:3];
    rnd     = root[2];
    stk     = root[1] | root[0] | rem_nz;
  end
endmodule
