// tb_fp_mds - self-checking test of the multiply/divide/square-root unit.
// Checks the products, quotients and roots of the test-program operands,
// special operands (NaN, infinity, zero, divide by zero, negative square
// root), subnormal inputs and outputs, overflow, and random operands
// against the double-precision reference (multiply in all five rounding
// modes, divide and square root in RNE). Also checks the latency: ready
// 4 cycles after start for multiply, 28 for divide and square root.
module tb_fp_mds;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0;
  mds_op_e     op;
  logic [31:0] a, b, y;
  rm_t         rm;
  logic        busy, ready;
  fflags_t     fl;
  int checks = 0, failures = 0;

  fp_mds dut (.clk(clk), .rst_n(rst_n), .start(start), .op(op), .a(a), .b(b), .rm(rm),
              .busy(busy), .ready(ready), .result(y), .flags(fl));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input mds_op_e iop, input logic [31:0] ia, input logic [31:0] ib, input rm_t irm,
                     input logic [31:0] ey, input logic [4:0] efl, input bit cfl);
    int cyc;
    @(negedge clk);
    op = iop; a = ia; b = ib; rm = irm; start = 1;
    @(negedge clk);
    start = 0;
    a = $urandom; b = $urandom;   // operands need only be valid in the start cycle
    cyc = 1;
    while (!ready) begin @(negedge clk); cyc++; end
    checks++;
    if (y !== ey || (cfl && fl !== efl)) begin
      failures++;
      $display("FAIL op=%0d %h %h rm=%0d: got %h fl=%b exp %h fl=%b", iop, ia, ib, irm, y, fl, ey, efl);
    end
    checks++;
    if (cyc != ((iop == MDS_MUL) ? 4 : 28)) begin
      failures++;
      $display("FAIL latency op=%0d: %0d cycles", iop, cyc);
    end
  endtask

  initial begin
    logic [31:0] ra, rb, ry;
    logic [2:0]  rrm;
    bit nx;
    op = MDS_MUL; a = 0; b = 0; rm = RM_RNE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // test-program operands a = 7583.1235, b = -304.4893
    run(MDS_MUL,  32'h45ECF8FD, 32'hC3983EA1, RM_RNE, 32'hCA0CEDD0, 5'b00001, 1);
    run(MDS_DIV,  32'h45ECF8FD, 32'hC3983EA1, RM_RNE, 32'hC1C73C37, 5'b00001, 1);
    run(MDS_SQRT, 32'h45ECF8FD, 32'h0,        RM_RNE, 32'h42AE298A, 5'b00001, 1);
    run(MDS_SQRT, 32'hC3983EA1, 32'h0,        RM_RNE, QNAN,         5'b10000, 1);
    // exact results
    run(MDS_MUL,  32'h40000000, 32'h40400000, RM_RNE, 32'h40C00000, 5'b00000, 1);  // 2*3
    run(MDS_DIV,  32'h40C00000, 32'h40400000, RM_RNE, 32'h40000000, 5'b00000, 1);  // 6/3
    run(MDS_SQRT, 32'h41100000, 32'h0,        RM_RNE, 32'h40400000, 5'b00000, 1);  // sqrt 9
    run(MDS_SQRT, 32'h40800000, 32'h0,        RM_RNE, 32'h40000000, 5'b00000, 1);  // sqrt 4 (odd unbiased exponent path checked by 9)
    // specials
    run(MDS_MUL,  32'h7F800000, 32'h00000000, RM_RNE, QNAN,         5'b10000, 1);  // inf * 0
    run(MDS_MUL,  32'h7F800000, 32'hBF800000, RM_RNE, 32'hFF800000, 5'b00000, 1);
    run(MDS_MUL,  32'h80000000, 32'h3F800000, RM_RNE, 32'h80000000, 5'b00000, 1);
    run(MDS_MUL,  32'h7FA00000, 32'h3F800000, RM_RNE, QNAN,         5'b10000, 1);
    run(MDS_DIV,  32'h3F800000, 32'h00000000, RM_RNE, 32'h7F800000, 5'b01000, 1);  // 1/0
    run(MDS_DIV,  32'hBF800000, 32'h00000000, RM_RNE, 32'hFF800000, 5'b01000, 1);
    run(MDS_DIV,  32'h00000000, 32'h00000000, RM_RNE, QNAN,         5'b10000, 1);  // 0/0
    run(MDS_DIV,  32'h7F800000, 32'h7F800000, RM_RNE, QNAN,         5'b10000, 1);
    run(MDS_DIV,  32'h3F800000, 32'h7F800000, RM_RNE, 32'h00000000, 5'b00000, 1);
    run(MDS_DIV,  32'h7FC00000, 32'h3F800000, RM_RNE, QNAN,         5'b00000, 1);
    run(MDS_SQRT, 32'h80000000, 32'h0,        RM_RNE, 32'h80000000, 5'b00000, 1);  // sqrt(-0)
    run(MDS_SQRT, 32'h7F800000, 32'h0,        RM_RNE, 32'h7F800000, 5'b00000, 1);
    run(MDS_SQRT, 32'hFF800000, 32'h0,        RM_RNE, QNAN,         5'b10000, 1);
    run(MDS_SQRT, 32'h00000001, 32'h0,        RM_RNE, 32'h1A3504F3, 5'b00001, 1);  // sqrt(2^-149)
    // overflow and underflow
    run(MDS_MUL,  32'h7F000000, 32'h7F000000, RM_RNE, 32'h7F800000, 5'b00101, 1);
    run(MDS_MUL,  32'h7F000000, 32'h7F000000, RM_RTZ, 32'h7F7FFFFF, 5'b00101, 1);
    run(MDS_MUL,  32'h00800000, 32'h3F000000, RM_RNE, 32'h00400000, 5'b00000, 1);  // exact subnormal
    run(MDS_MUL,  32'h00800001, 32'h3F000000, RM_RNE, 32'h00400000, 5'b00011, 1);  // tiny, inexact
    run(MDS_MUL,  32'h00000001, 32'h00000001, RM_RNE, 32'h00000000, 5'b00011, 1);
    run(MDS_MUL,  32'h00000001, 32'h00000001, RM_RUP, 32'h00000001, 5'b00011, 1);
    run(MDS_DIV,  32'h00000001, 32'h7F000000, RM_RNE, 32'h00000000, 5'b00011, 1);
    run(MDS_DIV,  32'h7F000000, 32'h00000001, RM_RNE, 32'h7F800000, 5'b00101, 1);
    // random
    for (int i = 0; i < 3000; i++) begin
      ra = rand_f32(); rb = rand_f32();
      rrm = 3'($urandom_range(0, 4));
      ry = r2f(f2r(ra) * f2r(rb), rrm, nx);
      run(MDS_MUL, ra, rb, rrm, ry, {4'b0, nx}, ry[30:23] != 8'h00 && ry[30:23] != 8'hFF && ry[30:0] != 31'h7F7FFFFF);
    end
    for (int i = 0; i < 2000; i++) begin
      ra = rand_f32(); rb = rand_f32();
      if (rb[30:0] == 0) rb = 32'h3F800000;
      ry = r2f(f2r(ra) / f2r(rb), 3'd0, nx);
      run(MDS_DIV, ra, rb, RM_RNE, ry, 5'b0, 0);
    end
    for (int i = 0; i < 2000; i++) begin
      ra = rand_f32(); ra[31] = 0;
      if (ra[30:0] == 0) ra = 32'h3F800000;
      ry = r2f($sqrt(f2r(ra)), 3'd0, nx);
      run(MDS_SQRT, ra, 32'h0, RM_RNE, ry, {4'b0, nx}, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
