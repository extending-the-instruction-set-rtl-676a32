// fp_regfile - floating-point register bank f0..f31.
//
// A second register file, next to the integer one, holding 32 registers of
// 32 bits. Two read ports (rs1, rs2) are asynchronous; the single write
// port is written on the rising clock edge. Unlike x0, f0 is an ordinary
// register. All registers are cleared by reset (this design's choice; the
// RISC-V manual leaves their reset value undefined).
module fp_regfile #(
  parameter int NREGS = 32,
  parameter int XLEN  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] raddr1,
  input  logic [$clog2(NREGS)-1:0] raddr2,
  output logic [XLEN-1:0]          rdata1,
  output logic [XLEN-1:0]          rdata2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [XLEN-1:0]          wdata
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = regs[raddr1];
  assign rdata2 = regs[raddr2];
endmodule
