// fp_exp_handler - exponent of a product, quotient or square root before
// normalisation.
//
// Inputs are the effective biased exponents of the operands (1 for
// subnormals) and, for divide and square root, the leading-zero counts
// used to normalise their significands.
//   multiply:    ea + eb - 127            (the bias is counted twice)
//   divide:      (ea - lza) - (eb - lzb) + 127   (the bias cancels)
//   square root: e = ea - lza - 127; result (e >>> 1) + 127, and when e is
//                odd the radicand is doubled (sqrt_odd), so the exponent
//                halves exactly.
// The multiplier works on the raw significands; its normaliser removes any
// leading zeros. Purely combinational.
module fp_exp_handler
  import fpu_pkg::*;
(
  input  mds_op_e            op,
  input  logic [7:0]         ea,
  input  logic [4:0]         lza,
  input  logic [7:0]         eb,
  input  logic [4:0]         lzb,
  output logic signed [11:0] exp_out,
  output logic               sqrt_odd
);
  logic signed [11:0] sea, seb, e_unb;

  always_comb begin
    sea   = $signed({4'd0, ea});
    seb   = $signed({4'd0, eb});
    e_unb = sea - $signed({7'd0, lza}) - 12'sd127;
    sqrt_odd = 1'b0;
    unique case (op)
      MDS_MUL: exp_out = sea + seb - 12'sd127;
      MDS_DIV: exp_out = (sea - $signed({7'd0, lza})) - (seb - $signed({7'd0, lzb})) + 12'sd127;
      default: begin
        exp_out  = (e_unb >>> 1) + 12'sd127;
        sqrt_odd = e_unb[0];
      end
    endcase
  end
endmodule
