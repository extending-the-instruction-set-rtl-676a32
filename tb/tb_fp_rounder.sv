// tb_fp_rounder - checks the rounding decision of fp_rounder for every
// combination of sign, LSB, round bit, sticky bit and rounding mode, by
// comparing with the distance to the two neighbouring values.
module tb_fp_rounder;
  import fpu_pkg::*;
  logic        sign, rnd, stk, nx;
  logic [23:0] sig;
  logic [24:0] so;
  rm_t         rm;
  int checks = 0, failures = 0;
  fp_rounder dut (.sign(sign), .sig(sig), .rnd(rnd), .stk(stk), .rm(rm), .sig_out(so), .inexact(nx));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] modes [5] = '{RM_RNE, RM_RTZ, RM_RDN, RM_RUP, RM_RMM};
    for (int m = 0; m < 5; m++)
      for (int v = 0; v < 64; v++) begin
        int frac4, up;   // discarded part in quarters: R*2 + S (S as "a bit more")
        sign = v[0]; rnd = v[1]; stk = v[2];
        sig  = v[3] ? 24'hFFFFFF : {$urandom_range(0, 1 << 22), v[4]};
        if (v[5]) sig[0] = ~sig[0];
        rm = modes[m];
        #1;
        frac4 = rnd * 2 + stk;       // 0: exact, 1: below half, 2: half, 3: above half
        case (m)
          0: up = (frac4 == 3) || (frac4 == 2 && sig[0]);
          1: up = 0;
          2: up = sign && frac4 != 0;
          3: up = !sign && frac4 != 0;
          default: up = frac4 >= 2;
        endcase
        checks++;
        if (so !== ({1'b0, sig} + 25'(up)) || nx !== (frac4 != 0)) begin
          failures++;
          $display("FAIL rm=%0d sign=%b sig=%h R=%b S=%b -> %h", rm, sign, sig, rnd, stk, so);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
