// fp_csr - floating-point control and status register (fcsr).
//
// Holds the dynamic rounding mode frm (3 bits) and the five exception
// flags fflags {NV, DZ, OF, UF, NX}. The flags are sticky: the flags of
// every completed FPU operation are ORed in and stay set until software
// writes the register. The host writes the whole fcsr ({frm, fflags},
// 8 bits) through csr_we/csr_wdata; a write wins over accrual in the same
// cycle. Reset clears both fields (frm = RNE).
module fp_csr
  import fpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       csr_we,
  input  logic [7:0] csr_wdata,
  output logic [7:0] csr_rdata,
  input  logic       accrue,
  input  fflags_t    accrue_flags,
  output rm_t        frm,
  output fflags_t    fflags
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frm    <= RM_RNE;
      fflags <= FLAGS_NONE;
    end else if (csr_we) begin
      frm    <= csr_wdata[7:5];
      fflags <= csr_wdata[4:0];
    end else if (accrue) begin
      fflags <= fflags | accrue_flags;
    end
  end

  assign csr_rdata = {frm, fflags};
endmodule
