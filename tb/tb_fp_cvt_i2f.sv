// tb_fp_cvt_i2f - checks integer-to-float conversion for the document's
// example 1123412, zero, extremes and random signed/unsigned integers in
// every rounding mode against the double-precision reference.
module tb_fp_cvt_i2f;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;
  logic [31:0] in, y;
  logic        sg;
  rm_t         rm;
  fflags_t     fl;
  int checks = 0, failures = 0;
  fp_cvt_i2f dut (.in(in), .is_signed(sg), .rm(rm), .result(y), .flags(fl));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] v, input logic s, input logic [2:0] r);
    real x;
    logic [31:0] ey;
    bit nx;
    in = v; sg = s; rm = r;
    #1;
    x  = s ? real'($signed(v)) : real'(v);
    ey = r2f(x, r, nx);
    checks++;
    if (y !== ey || fl !== {4'b0, nx}) begin
      failures++;
      $display("FAIL %h signed=%b rm=%0d: %h %b exp %h", v, s, r, y, fl, ey);
    end
  endtask

  initial begin
    in = 32'd1123412; sg = 1; rm = RM_RNE;
    #1;
    checks++;
    if (y !== 32'h498922A0) begin failures++; $display("FAIL 1123412 -> %h", y); end
    chk(0, 1, 0); chk(0, 0, 0); chk(32'h80000000, 1, 0); chk(32'hFFFFFFFF, 0, 0); chk(32'hFFFFFFFF, 1, 0);
    chk(32'h7FFFFFFF, 1, 1); chk(32'h00001D9F, 1, 0);
    for (int i = 0; i < 5000; i++)
      chk($urandom >> $urandom_range(0, 31), 1'($urandom), 3'($urandom_range(0, 4)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
