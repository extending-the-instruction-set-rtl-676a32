// tb_fp_div_sig - checks the significand divider: after 27 steps the
// quotient must be floor(Mx * 2^26 / My) and rem_nz must report a
// non-zero remainder, for random and extreme normalised significands.
module tb_fp_div_sig;
  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [23:0] mx, my;
  logic [26:0] q;
  logic        rnz;
  int checks = 0, failures = 0;
  fp_div_sig dut (.clk(clk), .rst_n(rst_n), .load(load), .step(step), .mx(mx), .my(my), .quo(q), .rem_nz(rnz));
  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [23:0] x, input logic [23:0] y);
    longint unsigned n, eq, er;
    n  = longint'(x) << 26;
    eq = n / longint'(y);
    er = n % longint'(y);
    @(negedge clk); mx = x; my = y; load = 1;
    @(negedge clk); load = 0; step = 1;
    repeat (27) @(negedge clk);
    step = 0;
    checks++;
    if (longint'(q) != eq || rnz != (er != 0)) begin
      failures++;
      $display("FAIL %h / %h: q=%h rnz=%b exp %h %b", x, y, q, rnz, eq, er != 0);
    end
  endtask

  initial begin
    mx = 0; my = 0;
    @(negedge clk); rst_n = 1;
    run(24'hFFFFFF, 24'h800000);
    run(24'h800000, 24'hFFFFFF);
    run(24'hC00000, 24'hC00000);
    for (int i = 0; i < 2000; i++) run(24'($urandom) | 24'h800000, 24'($urandom) | 24'h800000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
