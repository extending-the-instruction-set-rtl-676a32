// tb_fp_ctrl_decode - checks the decoded operation, bank selects,
// write-back bank, FPU/ALU select, rounding-mode resolution (static and
// dynamic) and illegal-encoding detection for every F instruction that is
// supported, plus the unimplemented fused multiply-add group and non-F
// opcodes.
module tb_fp_ctrl_decode;
  import fpu_pkg::*;
  import tb_rv_enc_pkg::*;
  logic [31:0] instr;
  rm_t         frm;
  fp_ctrl_t    c;
  int checks = 0, failures = 0;
  fp_ctrl_decode dut (.instr(instr), .frm(frm), .ctrl(c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: op, multi, d1 (FP bank), d2, wb (FP bank), illegal
  task automatic chk(input logic [31:0] i, input fpu_op_e eop, input bit multi, input bit d1, input bit d2,
                     input bit wb, input bit ill);
    instr = i;
    #1;
    checks++;
    if (c.op !== eop || c.multi_cycle !== multi || c.illegal !== ill ||
        (!ill && (c.data1_sel !== d1 || c.data2_sel !== d2 || c.regbank_sel !== wb || !c.is_fp)) ||
        c.rd !== i[11:7] || c.rs1 !== i[19:15]) begin
      failures++;
      $display("FAIL %h: %p", i, c);
    end
  endtask

  initial begin
    frm = RM_RUP;
    chk(r_fp(F7_FADD,  5'd16, 5'd15, 3'b000, 5'd17), FOP_ADD,  0, 1, 1, 1, 0);
    chk(r_fp(F7_FSUB,  5'd16, 5'd15, 3'b111, 5'd17), FOP_SUB,  0, 1, 1, 1, 0);
    checks++; if (c.rm !== RM_RUP || !c.int_or_float) begin failures++; $display("FAIL dyn rm"); end
    chk(r_fp(F7_FMUL,  5'd16, 5'd15, 3'b001, 5'd17), FOP_MUL,  1, 1, 1, 1, 0);
    checks++; if (c.rm !== RM_RTZ) begin failures++; $display("FAIL static rm"); end
    chk(r_fp(F7_FDIV,  5'd16, 5'd15, 3'b000, 5'd17), FOP_DIV,  1, 1, 1, 1, 0);
    chk(r_fp(F7_FSQRT, 5'd0,  5'd15, 3'b000, 5'd17), FOP_SQRT, 1, 1, 0, 1, 0);
    chk(r_fp(F7_FSQRT, 5'd3,  5'd15, 3'b000, 5'd17), FOP_NONE, 0, 0, 0, 0, 1);
    chk(r_fp(F7_FMINMAX, 5'd16, 5'd15, 3'b000, 5'd17), FOP_MIN, 0, 1, 1, 1, 0);
    chk(r_fp(F7_FMINMAX, 5'd16, 5'd15, 3'b001, 5'd17), FOP_MAX, 0, 1, 1, 1, 0);
    chk(r_fp(F7_FSGNJ, 5'd16, 5'd15, 3'b000, 5'd17), FOP_SGNJ,  0, 1, 1, 1, 0);
    chk(r_fp(F7_FSGNJ, 5'd16, 5'd15, 3'b001, 5'd17), FOP_SGNJN, 0, 1, 1, 1, 0);
    chk(r_fp(F7_FSGNJ, 5'd16, 5'd15, 3'b010, 5'd17), FOP_SGNJX, 0, 1, 1, 1, 0);
    chk(r_fp(F7_FSGNJ, 5'd16, 5'd15, 3'b011, 5'd17), FOP_NONE,  0, 0, 0, 0, 1);
    chk(r_fp(F7_FCVTWS, 5'd0, 5'd15, 3'b000, 5'd17), FOP_CVT_WS,  0, 1, 0, 0, 0);
    chk(r_fp(F7_FCVTWS, 5'd1, 5'd15, 3'b000, 5'd17), FOP_CVT_WUS, 0, 1, 0, 0, 0);
    chk(r_fp(F7_FCVTSW, 5'd0, 5'd15, 3'b000, 5'd17), FOP_CVT_SW,  0, 0, 0, 1, 0);
    chk(r_fp(F7_FCVTSW, 5'd1, 5'd15, 3'b000, 5'd17), FOP_CVT_SWU, 0, 0, 0, 1, 0);
    chk(r_fp(F7_FMVXW, 5'd0, 5'd15, 3'b000, 5'd20), FOP_MV_XW, 0, 1, 0, 0, 0);
    chk(r_fp(F7_FMVXW, 5'd0, 5'd15, 3'b001, 5'd22), FOP_CLASS, 0, 1, 0, 0, 0);
    chk(r_fp(F7_FMVWX, 5'd0, 5'd15, 3'b000, 5'd20), FOP_MV_WX, 0, 0, 0, 1, 0);
    chk(r_fp(F7_FCMP, 5'd16, 5'd15, 3'b010, 5'd22), FOP_EQ, 0, 1, 1, 0, 0);
    chk(r_fp(F7_FCMP, 5'd16, 5'd15, 3'b001, 5'd22), FOP_LT, 0, 1, 1, 0, 0);
    chk(r_fp(F7_FCMP, 5'd16, 5'd15, 3'b000, 5'd22), FOP_LE, 0, 1, 1, 0, 0);
    chk(r_fp(F7_FADD,  5'd16, 5'd15, 3'b101, 5'd17), FOP_NONE, 0, 0, 0, 0, 1);   // reserved rm
    frm = 3'b110;
    chk(r_fp(F7_FADD,  5'd16, 5'd15, 3'b111, 5'd17), FOP_NONE, 0, 0, 0, 0, 1);   // DYN with bad frm
    chk(r_fp(F7_FSGNJ, 5'd16, 5'd15, 3'b000, 5'd17), FOP_SGNJ, 0, 1, 1, 1, 0);   // rm not used
    chk(flw(5'd15, 5'd8, 12'd0), FOP_NONE, 0, 0, 0, 1, 0);
    checks++; if (!c.is_load || c.int_or_float) begin failures++; $display("FAIL flw"); end
    chk(fsw(5'd17, 5'd8, -12'sd8), FOP_NONE, 0, 0, 1, 0, 0);
    checks++; if (!c.is_store) begin failures++; $display("FAIL fsw"); end
    chk({12'd0, 5'd8, 3'b011, 5'd15, 7'b0000111}, FOP_NONE, 0, 0, 0, 0, 1);      // FLD: not supported
    chk({5'd16, 2'b00, 5'd16, 5'd15, 3'b000, 5'd17, 7'b1000011}, FOP_NONE, 0, 0, 0, 0, 1);  // FMADD
    chk({5'd16, 2'b00, 5'd16, 5'd15, 3'b000, 5'd17, 7'b1001111}, FOP_NONE, 0, 0, 0, 0, 1);  // FNMADD
    instr = 32'h00000013;                                               // addi x0,x0,0
    #1; checks++;
    if (c.is_fp || c.op !== FOP_NONE) begin failures++; $display("FAIL integer instr decoded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
