// tb_fp_exp_handler - checks the pre-normalisation exponents of multiply,
// divide and square root (including the odd-exponent flag) against the
// formulas evaluated in the testbench with integers.
module tb_fp_exp_handler;
  import fpu_pkg::*;
  mds_op_e            op;
  logic [7:0]         ea, eb;
  logic [4:0]         lza, lzb;
  logic signed [11:0] eo;
  logic               odd;
  int checks = 0, failures = 0;
  fp_exp_handler dut (.op(op), .ea(ea), .lza(lza), .eb(eb), .lzb(lzb), .exp_out(eo), .sqrt_odd(odd));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int e, u, exp_e, exp_odd;
      ea = 8'($urandom_range(1, 254)); eb = 8'($urandom_range(1, 254));
      lza = 5'($urandom_range(0, 23)); lzb = 5'($urandom_range(0, 23));
      op = mds_op_e'(i % 3);
      #1;
      exp_odd = 0;
      case (i % 3)
        0: exp_e = int'(ea) + int'(eb) - 127;
        1: exp_e = int'(ea) - int'(lza) - int'(eb) + int'(lzb) + 127;
        default: begin
          u = int'(ea) - int'(lza) - 127;
          exp_odd = (u % 2 != 0);
          e = exp_odd ? (u - 1) / 2 : u / 2;
          exp_e = e + 127;
        end
      endcase
      checks++;
      if (int'(eo) != exp_e || int'(odd) != exp_odd) begin
        failures++;
        $display("FAIL op=%0d ea=%0d lza=%0d eb=%0d lzb=%0d: %0d %b exp %0d %0d", op, ea, lza, eb, lzb, eo, odd, exp_e, exp_odd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
