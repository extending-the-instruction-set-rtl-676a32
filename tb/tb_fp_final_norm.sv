// tb_fp_final_norm - checks packing, the rounding carry, a subnormal
// rounding up to the smallest normal number, overflow in every rounding
// mode and the underflow flag.
module tb_fp_final_norm;
  import fpu_pkg::*;
  logic        sign, nx;
  logic [9:0]  exp;
  logic [24:0] sig;
  rm_t         rm;
  logic [31:0] y;
  fflags_t     fl;
  int checks = 0, failures = 0;
  fp_final_norm dut (.sign(sign), .exp(exp), .sig(sig), .inexact(nx), .rm(rm), .result(y), .flags(fl));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic s, input logic [9:0] e, input logic [24:0] m, input logic inx, input rm_t r,
                     input logic [31:0] ey, input logic [4:0] ef);
    sign = s; exp = e; sig = m; nx = inx; rm = r;
    #1;
    checks++;
    if (y !== ey || fl !== ef) begin
      failures++;
      $display("FAIL s=%b e=%0d sig=%h nx=%b rm=%0d: %h %b exp %h %b", s, e, m, inx, r, y, fl, ey, ef);
    end
  endtask

  initial begin
    chk(0, 10'd127, 25'h0800000, 0, RM_RNE, 32'h3F800000, 5'b00000);
    chk(1, 10'd127, 25'h0C00000, 1, RM_RNE, 32'hBFC00000, 5'b00001);
    chk(0, 10'd127, 25'h1000000, 1, RM_RNE, 32'h40000000, 5'b00001);  // rounding carry
    chk(0, 10'd0,   25'h0400000, 0, RM_RNE, 32'h00400000, 5'b00000);  // exact subnormal
    chk(0, 10'd0,   25'h0400000, 1, RM_RNE, 32'h00400000, 5'b00011);  // tiny inexact
    chk(0, 10'd0,   25'h0800000, 1, RM_RNE, 32'h00800000, 5'b00001);  // rounded up to normal
    chk(0, 10'd254, 25'h1000000, 1, RM_RNE, 32'h7F800000, 5'b00101);  // carry overflows
    chk(0, 10'd300, 25'h0800000, 1, RM_RNE, 32'h7F800000, 5'b00101);
    chk(1, 10'd300, 25'h0800000, 1, RM_RMM, 32'hFF800000, 5'b00101);
    chk(0, 10'd300, 25'h0800000, 1, RM_RTZ, 32'h7F7FFFFF, 5'b00101);
    chk(0, 10'd300, 25'h0800000, 1, RM_RDN, 32'h7F7FFFFF, 5'b00101);
    chk(1, 10'd300, 25'h0800000, 1, RM_RDN, 32'hFF800000, 5'b00101);
    chk(0, 10'd300, 25'h0800000, 1, RM_RUP, 32'h7F800000, 5'b00101);
    chk(1, 10'd300, 25'h0800000, 1, RM_RUP, 32'hFF7FFFFF, 5'b00101);
    chk(0, 10'd255, 25'h0800000, 0, RM_RNE, 32'h7F800000, 5'b00101);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
