// tb_fp_sqrt_norm - checks that the square-root normaliser takes the
// 24 significand bits, the round bit and the sticky bit from the right
// places of the root and passes the exponent on.
module tb_fp_sqrt_norm;
  logic [26:0]        root;
  logic               rem_nz;
  logic signed [11:0] exp_in;
  logic [9:0]         eo;
  logic [23:0]        so;
  logic               r, s;
  int checks = 0, failures = 0;
  fp_sqrt_norm dut (.root(root), .rem_nz(rem_nz), .exp_in(exp_in), .exp_out(eo), .sig_out(so), .rnd(r), .stk(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      root   = 27'($urandom) | 27'h4000000;
      rem_nz = 1'($urandom);
      exp_in = 12'($urandom_range(52, 190));
      #1;
      checks++;
      if (so !== root / 8 || r !== root[2] || s !== ((root % 4 != 0) || rem_nz) || int'(eo) != int'(exp_in)) begin
        failures++;
        $display("FAIL root=%h rem=%b -> %h %b %b", root, rem_nz, so, r, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
