// fp_sgnj - sign injection (FSGNJ.S, FSGNJN.S, FSGNJX.S).
//
// The result keeps the exponent and mantissa of rs1; its sign is the sign
// of rs2 (mode 00), its inverse (01) or the XOR of both signs (10); mode is
// the rm field of the instruction. These also implement the FMV.S, FNEG.S
// and FABS.S pseudo-instructions. No flags are raised. Combinational.
module fp_sgnj (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [1:0]  mode,
  output logic [31:0] result
);
  logic s;
  always_comb begin
    unique case (mode)
      2'b00:   s = b[31];
      2'b01:   s = ~b[31];
      default: s = a[31] ^ b[31];
    endcase
    result = {s, a[30:0]};
  end
endmodule
