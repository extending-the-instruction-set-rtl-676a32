// tb_fp_csr - checks that exception flags accumulate and stay set
// (sticky), that a write replaces frm and fflags, and the reset value.
module tb_fp_csr;
  import fpu_pkg::*;
  logic       clk = 0, rst_n = 0, we = 0, acc = 0;
  logic [7:0] wdata, rdata;
  fflags_t    af, ff;
  rm_t        frm;
  logic [7:0] model;
  int checks = 0, failures = 0;
  fp_csr dut (.clk(clk), .rst_n(rst_n), .csr_we(we), .csr_wdata(wdata), .csr_rdata(rdata),
              .accrue(acc), .accrue_flags(af), .frm(frm), .fflags(ff));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdata = 0; af = 0; model = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (rdata !== model || frm !== model[7:5] || ff !== model[4:0]) begin
        failures++; $display("FAIL fcsr=%h model=%h", rdata, model);
      end
      we = ($urandom_range(0, 9) == 0); wdata = 8'($urandom);
      acc = 1'($urandom); af = 5'(1 << $urandom_range(0, 4));
      if (we) model = wdata;
      else if (acc) model[4:0] = model[4:0] | af;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
