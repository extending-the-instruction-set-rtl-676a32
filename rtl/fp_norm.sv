// fp_norm - pre-rounding normaliser shared by the adder, multiplier and
// divider paths (the "mulNorm" / "divNorm" normalisers).
//
// The input significand has two integer bits: bit IW-1 has weight 2 and bit
// IW-2 weight 1 (the form 1x.xxx / 01.xxx of a product or sum). Its
// exponent is biased and signed. The normaliser:
//   * shifts right by one and increments the exponent when bit IW-1 is set;
//   * otherwise shifts left by the leading-zero count, but never so far that
//     the exponent falls below 1 - if it would, the shift stops and the
//     result is subnormal (exponent 0);
//   * when the exponent is already below 1 (exponent underflow) shifts right
//     by 1 - exponent and reports exponent 0, folding the bits shifted out
//     into the sticky bit.
// It then delivers 24 significand bits, the round bit and the sticky bit for
// fp_rounder. sticky_in carries inexactness from earlier stages (alignment
// shift, non-zero division remainder). Purely combinational.
module fp_norm #(
  parameter int IW = 48           // input significand width, >= 27
) (
  input  logic [IW-1:0]      sig_in,
  input  logic signed [11:0] exp_in,
  input  logic               sticky_in,
  output logic [9:0]         exp_out,
  output logic [23:0]        sig_out,
  output logic               rnd,
  output logic               stk
);
  logic signed [11:0] lz, e1, lsh, rsh;
  logic [IW-1:0]      t;
  logic [2*IW-1:0]    wide;
  logic               lost;

  always_comb begin
    lz = 12'sd0;
    for (int i = 0; i < IW - 1; i++)
      if (sig_in[i]) lz = 12'(IW - 2 - i);

    if (sig_in[IW-1]) begin
      e1  = exp_in + 12'sd1;
      lsh = -12'sd1;
    end else begin
      e1  = exp_in - lz;
      lsh = lz;
    end
    if (e1 < 12'sd1) begin
      lsh     = lsh - (12'sd1 - e1);
      exp_out = 10'd0;
    end else begin
      exp_out = e1[9:0];
    end

    wide = '0;
    rsh  = 12'sd0;
    lost = 1'b0;
    if (lsh >= 12'sd0) begin
      t = sig_in << lsh;
    end else begin
      rsh  = (-lsh > 12'(IW)) ? 12'(IW) : -lsh;
      wide = {sig_in, {IW{1'b0}}} >> rsh;
      t    = wide[2*IW-1:IW];
      lost = |wide[IW-1:0];
    end

    if (sig_in == '0) begin
      exp_out = 10'd0;
      t       = '0;
      lost    = 1'b0;
    end

    sig_out = t[IW-2 -: 24];
    rnd     = t[IW-26];
    stk     = (|t[IW-27:0]) | lost | sticky_in;
  end
endmodule
