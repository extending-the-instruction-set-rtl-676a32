// tb_fp_mul24 - checks the partitioned 24 x 24 multiplier against the
// simulator's integer product for random and extreme operands, and that
// the product appears after exactly three steps.
module tb_fp_mul24;
  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [23:0] a, b;
  logic [47:0] p;
  int checks = 0, failures = 0;
  fp_mul24 dut (.clk(clk), .rst_n(rst_n), .load(load), .step(step), .a(a), .b(b), .product(p));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [23:0] x, input logic [23:0] y);
    logic [47:0] ref_p;
    ref_p = 48'(x) * 48'(y);
    @(negedge clk); a = x; b = y; load = 1;
    @(negedge clk); load = 0; step = 1;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (p == ref_p) begin failures++; $display("FAIL product visible after 2 steps"); end
    @(negedge clk); step = 0;
    checks++;
    if (p !== ref_p) begin failures++; $display("FAIL %h * %h = %h, exp %h", x, y, p, ref_p); end
  endtask

  initial begin
    a = 0; b = 0;
    @(negedge clk); rst_n = 1;
    run(24'hFFFFFF, 24'hFFFFFF);
    run(24'h800000, 24'h800000);
    run(24'hECF8FD, 24'h983EA1);
    for (int i = 0; i < 3000; i++) run(24'($urandom) | 24'h800000, 24'($urandom) | 24'h800000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
