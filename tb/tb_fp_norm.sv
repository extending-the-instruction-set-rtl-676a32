// tb_fp_norm - checks the pre-rounding normaliser at the multiplier width
// (48 bits). For random significands and exponents, including exponent
// underflow and inputs with many leading zeros, the kept bits plus round
// bit must equal the input value truncated at that position, the sticky
// bit must say whether anything below was lost, and the output must be
// normalised (bit 23 set) unless the exponent is 0.
module tb_fp_norm;
  import tb_fp_ref_pkg::*;
  logic [47:0]        sig_in;
  logic signed [11:0] exp_in;
  logic               sticky_in;
  logic [9:0]         eo;
  logic [23:0]        so;
  logic               r, s;
  int checks = 0, failures = 0;
  fp_norm #(.IW(48)) dut (.sig_in(sig_in), .exp_in(exp_in), .sticky_in(sticky_in),
                          .exp_out(eo), .sig_out(so), .rnd(r), .stk(s));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      real vin, vkept, diff;
      int  ee;
      bit  ok;
      sig_in = {$urandom, $urandom};
      sig_in = sig_in >> $urandom_range(0, 47);
      if (sig_in == 0) sig_in = 48'd1;
      exp_in = 12'($urandom_range(0, 300)) - 12'sd30;
      sticky_in = 0;
      #1;
      vin   = real'(sig_in) * pow2(int'(exp_in) - 127 - 46);
      ee    = (eo == 0) ? 1 : int'(eo);
      vkept = (real'(so) + (r ? 0.5 : 0.0)) * pow2(ee - 127 - 23);
      diff  = vin - vkept;
      ok = (diff >= 0.0) && (diff < pow2(ee - 127 - 24)) && (s == (diff != 0.0));
      ok = ok && ((eo == 0) || so[23]);
      ok = ok && !((eo == 0) && (int'(exp_in) - 1 > 0) && sig_in[47]);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL sig=%h exp=%0d -> e=%0d sig=%h r=%b s=%b", sig_in, exp_in, eo, so, r, s);
      end
    end
    // sticky input
    sig_in = 48'h4000_0000_0000; exp_in = 12'sd100; sticky_in = 1;
    #1;
    checks++;
    if (!(s && !r && eo == 10'd100 && so == 24'h800000)) begin failures++; $display("FAIL sticky_in"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
