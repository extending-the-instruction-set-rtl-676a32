// tb_fp_regfile - writes random values to random registers (f0 included)
// and checks both read ports against a shadow array, and the reset value.
module tb_fp_regfile;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;
  fp_regfile dut (.clk(clk), .rst_n(rst_n), .raddr1(ra1), .raddr2(ra2), .rdata1(rd1), .rdata2(rd2),
                  .we(we), .waddr(wa), .wdata(wd));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    for (int i = 0; i < 32; i++) shadow[i] = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); #1; checks++;
      if (rd1 !== 0) begin failures++; $display("FAIL reset f%0d", i); end
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1;
      checks++;
      if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2]) begin failures++; $display("FAIL read f%0d/f%0d", ra1, ra2); end
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
