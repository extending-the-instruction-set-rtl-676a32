// tb_rv_enc_pkg - RISC-V F-extension instruction encoders for the
// testbenches (R type for OP-FP, I type for FLW, S type for FSW).
package tb_rv_enc_pkg;
  function automatic logic [31:0] r_fp(input logic [6:0] f7, input logic [4:0] rs2, input logic [4:0] rs1,
                                      input logic [2:0] rm, input logic [4:0] rd);
    return {f7, rs2, rs1, rm, rd, 7'b1010011};
  endfunction
  function automatic logic [31:0] flw(input logic [4:0] rd, input logic [4:0] rs1, input logic [11:0] imm);
    return {imm, rs1, 3'b010, rd, 7'b0000111};
  endfunction
  function automatic logic [31:0] fsw(input logic [4:0] rs2, input logic [4:0] rs1, input logic [11:0] imm);
    return {imm[11:5], rs2, rs1, 3'b010, imm[4:0], 7'b0100111};
  endfunction
endpackage
