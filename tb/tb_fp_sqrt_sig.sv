// tb_fp_sqrt_sig - checks the non-restoring square root: after 27 steps
// the root must be the integer square root of the 54-bit radicand and
// rem_nz must say whether the radicand was not a perfect square.
module tb_fp_sqrt_sig;
  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [53:0] rad;
  logic [26:0] root;
  logic        rnz;
  int checks = 0, failures = 0;
  fp_sqrt_sig dut (.clk(clk), .rst_n(rst_n), .load(load), .step(step), .rad(rad), .root(root), .rem_nz(rnz));
  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned isqrt(input longint unsigned v);
    longint unsigned lo, hi, mid;
    lo = 0; hi = 64'd1 << 27;
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      if (mid * mid <= v) lo = mid; else hi = mid;
    end
    return lo;
  endfunction

  task automatic run(input logic [53:0] d);
    longint unsigned er;
    er = isqrt(longint'(d));
    @(negedge clk); rad = d; load = 1;
    @(negedge clk); load = 0; step = 1;
    repeat (27) @(negedge clk);
    step = 0;
    checks++;
    if (longint'(root) != er || rnz != (er * er != longint'(d))) begin
      failures++;
      $display("FAIL sqrt %h: %h %b exp %h", d, root, rnz, er);
    end
  endtask

  initial begin
    rad = 0;
    @(negedge clk); rst_n = 1;
    run(54'd0); run(54'd1); run(54'd4); run(54'd9 << 50); run({54{1'b1}});
    run(54'(64'd12345 * 64'd12345));
    for (int i = 0; i < 2000; i++) run({$urandom, $urandom} >> (i % 8 == 0 ? $urandom_range(0, 40) : 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
