// tb_fp_sign_handler - checks the result sign for all operations and sign
// combinations.
module tb_fp_sign_handler;
  import fpu_pkg::*;
  mds_op_e op;
  logic    sa, sb, s, neg;
  int checks = 0, failures = 0;
  fp_sign_handler dut (.op(op), .sa(sa), .sb(sb), .sign(s), .sqrt_neg(neg));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 3; o++)
      for (int v = 0; v < 4; v++) begin
        op = mds_op_e'(o); sa = v[0]; sb = v[1];
        #1;
        checks++;
        if (s !== ((o == 2) ? v[0] : (v[0] != v[1])) || neg !== (o == 2 && v[0])) begin
          failures++;
          $display("FAIL op=%0d sa=%b sb=%b -> %b %b", o, sa, sb, s, neg);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
