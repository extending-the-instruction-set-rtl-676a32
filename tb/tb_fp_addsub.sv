// tb_fp_addsub - self-checking test of fp_addsub.
// Directed cases (the four vectors printed with the adder description,
// cancellation, subnormal sums, infinities, NaNs, signed zeros, overflow)
// and random operands against the double-precision reference in RNE.
module tb_fp_addsub;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  rm_t         rm;
  fflags_t     fl;
  int checks = 0, failures = 0;

  fp_addsub dut (.a(a), .b(b), .sub(sub), .rm(rm), .result(y), .flags(fl));

  task automatic chk(input logic [31:0] ia, input logic [31:0] ib, input logic is, input rm_t irm,
                     input logic [31:0] exp_y, input logic [4:0] exp_fl, input bit cfl);
    a = ia; b = ib; sub = is; rm = irm;
    #1;
    checks++;
    if (y !== exp_y || (cfl && fl !== exp_fl)) begin
      failures++;
      $display("FAIL %h %s %h rm=%0d: got %h fl=%b exp %h fl=%b", ia, is ? "-" : "+", ib, irm, y, fl, exp_y, exp_fl);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ra, rb, ry;
    bit nx;
    chk(32'h3fe00000, 32'h40800000, 0, RM_RNE, 32'h40b80000, 5'b00000, 1);  // 1.75 + 4
    chk(32'hc2f71062, 32'h43fa281d, 0, RM_RNE, 32'h43bc6404, 5'b00001, 1);  // -123.53 + 500.3134
    chk(32'h00000000, 32'hc20a0000, 0, RM_RNE, 32'hc20a0000, 5'b00000, 1);
    chk(32'h3e7020c5, 32'hc0add2f2, 0, RM_RNE, 32'hc0a651ec, 5'b00001, 0);
    chk(32'h45ECF8FD, 32'hC3983EA1, 0, RM_RNE, 32'h45E37513, 5'b00001, 0);  // a + b of the test program
    chk(32'h45ECF8FD, 32'hC3983EA1, 1, RM_RNE, 32'h45F67CE7, 5'b00001, 0);  // a - b
    chk(32'h4019999a, 32'h40866666, 1, RM_RNE, 32'hbfe66664, 5'b00000, 1);  // 2.4 - 4.2
    chk(32'h4016147b, 32'h40ab020c, 0, RM_RNE, 32'h40f60c4a, 5'b00001, 0);  // 2.345 + 5.344
    chk(32'h3f800000, 32'h3f800000, 1, RM_RNE, 32'h00000000, 5'b00000, 1);  // x - x = +0
    chk(32'h3f800000, 32'h3f800000, 1, RM_RDN, 32'h80000000, 5'b00000, 1);  // -0 when rounding down
    chk(32'h80000000, 32'h80000000, 0, RM_RNE, 32'h80000000, 5'b00000, 1);  // -0 + -0
    chk(32'h007fffff, 32'h00000001, 0, RM_RNE, 32'h00800000, 5'b00000, 1);  // subnormal sum becomes normal
    chk(32'h007fffff, 32'h007fffff, 0, RM_RNE, 32'h00fffffe, 5'b00000, 1);
    chk(32'h7f800000, 32'hff800000, 0, RM_RNE, QNAN,         5'b10000, 1);  // inf - inf
    chk(32'h7f800000, 32'h3f800000, 1, RM_RNE, 32'h7f800000, 5'b00000, 1);
    chk(32'h7fa00000, 32'h3f800000, 0, RM_RNE, QNAN,         5'b10000, 1);  // sNaN
    chk(32'h7fc00001, 32'h3f800000, 0, RM_RNE, QNAN,         5'b00000, 1);  // qNaN
    chk(32'h7f7fffff, 32'h7f7fffff, 0, RM_RNE, 32'h7f800000, 5'b00101, 1);  // overflow
    chk(32'h7f7fffff, 32'h7f7fffff, 0, RM_RTZ, 32'h7f7fffff, 5'b00101, 1);
    chk(32'h3f800000, 32'h33800000, 0, RM_RNE, 32'h3f800000, 5'b00001, 1);  // 1 + 2^-24 tie to even
    chk(32'h3f800000, 32'h33800000, 0, RM_RUP, 32'h3f800001, 5'b00001, 1);
    chk(32'h3f800000, 32'h33800000, 1, RM_RTZ, 32'h3f7fffff, 5'b00000, 1);  // 1 - 2^-24 is exact
    chk(32'h3f800000, 32'h33000000, 1, RM_RTZ, 32'h3f7fffff, 5'b00001, 1);  // 1 - 2^-25 toward zero
    chk(32'h3f800000, 32'h33000000, 1, RM_RDN, 32'h3f7fffff, 5'b00001, 1);
    chk(32'h3f800000, 32'h33000000, 1, RM_RNE, 32'h3f800000, 5'b00001, 1);  // tie, even is 1.0
    chk(32'h3f800000, 32'h33000000, 1, RM_RUP, 32'h3f800000, 5'b00001, 1);
    chk(32'h3f800000, 32'h33800000, 0, RM_RMM, 32'h3f800001, 5'b00001, 1);
    for (int i = 0; i < 20000; i++) begin
      ra = rand_f32();
      rb = rand_f32();
      if (i % 4 == 0) rb[30:23] = ra[30:23] + 8'($urandom_range(0, 2) - 1);  // near cancellation
      if (rb[30:23] == 8'hFF) rb[30:23] = 8'hFE;
      sub = i[0];
      ry = r2f(f2r(ra) + (sub ? -f2r(rb) : f2r(rb)), 3'd0, nx);
      if (ry[30:0] == 0) ry = (ra[31] == (rb[31] ^ sub)) ? {ra[31], 31'd0} : 32'd0;
      chk(ra, rb, sub, RM_RNE, ry, 5'b0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
