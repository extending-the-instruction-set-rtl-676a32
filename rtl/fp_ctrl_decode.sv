// fp_ctrl_decode - control-unit extension for the F instructions.
//
// Decodes one 32-bit instruction word. LOAD-FP/STORE-FP with width 010
// (FLW/FSW) reuse the integer load/store control; the only additions are
// the register-bank selects: the base address always comes from the
// integer bank (data1_sel = 0), the store data from the FP bank
// (data2_sel = 1), and a load writes the FP bank (regbank_sel = 1).
// OP-FP instructions are mapped to an FPU operation; data1_sel/data2_sel
// say which bank each source is read from, regbank_sel which bank is
// written, and int_or_float = 1 selects the FPU output instead of the ALU
// output. The rounding mode is the instruction's rm field, or frm when the
// field is DYN; an rm of 101/110 (or DYN with such an frm) on an
// instruction that rounds is illegal. The fused multiply-add group (R4
// type) is not implemented: it is recognised as an F instruction and
// flagged illegal. Any other opcode gives is_fp = 0. Combinational.
module fp_ctrl_decode
  import fpu_pkg::*;
(
  input  logic [31:0] instr,
  input  rm_t         frm,
  output fp_ctrl_t    ctrl
);
  logic [6:0] opc, f7;
  logic [2:0] f3;
  logic [4:0] rs2f;
  logic       rounds;
  rm_t        rm_eff;

  always_comb begin
    opc  = instr[6:0];
    f3   = instr[14:12];
    f7   = instr[31:25];
    rs2f = instr[24:20];

    ctrl = '0;
    ctrl.op  = FOP_NONE;
    ctrl.rs1 = instr[19:15];
    ctrl.rs2 = instr[24:20];
    ctrl.rd  = instr[11:7];
    rounds   = 1'b0;
    rm_eff   = (f3 == RM_DYN) ? frm : f3;
    ctrl.rm  = rm_eff;

    unique case (opc)
      OPC_LOAD_FP: begin
        ctrl.is_fp       = 1'b1;
        ctrl.is_load     = 1'b1;
        ctrl.regbank_sel = 1'b1;
        ctrl.illegal     = (f3 != 3'b010);
      end
      OPC_STORE_FP: begin
        ctrl.is_fp     = 1'b1;
        ctrl.is_store  = 1'b1;
        ctrl.data2_sel = 1'b1;
        ctrl.illegal   = (f3 != 3'b010);
      end
      OPC_OP_FP: begin
        ctrl.is_fp        = 1'b1;
        ctrl.int_or_float = 1'b1;
        ctrl.data1_sel    = 1'b1;
        ctrl.data2_sel    = 1'b1;
        ctrl.regbank_sel  = 1'b1;
        unique case (f7)
          F7_FADD: begin ctrl.op = FOP_ADD; rounds = 1'b1; end
          F7_FSUB: begin ctrl.op = FOP_SUB; rounds = 1'b1; end
          F7_FMUL: begin ctrl.op = FOP_MUL; rounds = 1'b1; ctrl.multi_cycle = 1'b1; end
          F7_FDIV: begin ctrl.op = FOP_DIV; rounds = 1'b1; ctrl.multi_cycle = 1'b1; end
          F7_FSQRT: begin
            ctrl.op = FOP_SQRT; rounds = 1'b1; ctrl.multi_cycle = 1'b1;
            ctrl.data2_sel = 1'b0;
            ctrl.illegal   = (rs2f != 5'd0);
          end
          F7_FSGNJ: begin
            unique case (f3)
              3'b000:  ctrl.op = FOP_SGNJ;
              3'b001:  ctrl.op = FOP_SGNJN;
              3'b010:  ctrl.op = FOP_SGNJX;
              default: ctrl.illegal = 1'b1;
            endcase
          end
          F7_FMINMAX: begin
            unique case (f3)
              3'b000:  ctrl.op = FOP_MIN;
              3'b001:  ctrl.op = FOP_MAX;
              default: ctrl.illegal = 1'b1;
            endcase
          end
          F7_FCMP: begin
            ctrl.regbank_sel = 1'b0;
            unique case (f3)
              3'b010:  ctrl.op = FOP_EQ;
              3'b001:  ctrl.op = FOP_LT;
              3'b000:  ctrl.op = FOP_LE;
              default: ctrl.illegal = 1'b1;
            endcase
          end
          F7_FCVTWS: begin
            ctrl.regbank_sel = 1'b0;
            ctrl.data2_sel   = 1'b0;
            rounds           = 1'b1;
            unique case (rs2f)
              5'd0:    ctrl.op = FOP_CVT_WS;
              5'd1:    ctrl.op = FOP_CVT_WUS;
              default: ctrl.illegal = 1'b1;
            endcase
          end
          F7_FCVTSW: begin
            ctrl.data1_sel = 1'b0;
            ctrl.data2_sel = 1'b0;
            rounds         = 1'b1;
            unique case (rs2f)
              5'd0:    ctrl.op = FOP_CVT_SW;
              5'd1:    ctrl.op = FOP_CVT_SWU;
              default: ctrl.illegal = 1'b1;
            endcase
          end
          F7_FMVXW: begin
            ctrl.regbank_sel = 1'b0;
            ctrl.data2_sel   = 1'b0;
            if (rs2f != 5'd0)      ctrl.illegal = 1'b1;
            else if (f3 == 3'b000) ctrl.op = FOP_MV_XW;
            else if (f3 == 3'b001) ctrl.op = FOP_CLASS;
            else                   ctrl.illegal = 1'b1;
          end
          F7_FMVWX: begin
            ctrl.data1_sel = 1'b0;
            ctrl.data2_sel = 1'b0;
            if (rs2f == 5'd0 && f3 == 3'b000) ctrl.op = FOP_MV_WX;
            else                              ctrl.illegal = 1'b1;
          end
          default: ctrl.illegal = 1'b1;
        endcase
      end
      // fused multiply-add group (FMADD/FMSUB/FNMSUB/FNMADD): not implemented
      7'b1000011, 7'b1000111, 7'b1001011, 7'b1001111: begin
        ctrl.is_fp   = 1'b1;
        ctrl.illegal = 1'b1;
      end
      default: ;
    endcase

    if (rounds && (rm_eff == 3'b101 || rm_eff == 3'b110 || rm_eff == RM_DYN))
      ctrl.illegal = 1'b1;
    if (ctrl.illegal) begin
      ctrl.op          = FOP_NONE;
      ctrl.multi_cycle = 1'b0;
    end
  end
endmodule
