// tb_fpu - checks the execute unit: every operation on the test-program
// operands a = 7583.1235 (0x45ECF8FD) and b = -304.4893 (0xC3983EA1), the
// same-cycle completion of single-cycle operations, busy during multiply,
// divide and square root, and their latencies (4 and 28 cycles).
module tb_fpu;
  import fpu_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0;
  fpu_op_e     op;
  logic [31:0] a, b, y;
  rm_t         rm;
  logic        busy, done;
  fflags_t     fl;
  int checks = 0, failures = 0;
  fpu dut (.clk(clk), .rst_n(rst_n), .start(start), .op(op), .a(a), .b(b), .rm(rm),
           .busy(busy), .done(done), .result(y), .flags(fl));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fpu_op_e iop, input logic [31:0] ia, input logic [31:0] ib,
                     input logic [31:0] ey, input logic [4:0] efl, input int lat);
    int cyc;
    @(negedge clk);
    op = iop; a = ia; b = ib; rm = RM_RNE; start = 1;
    #1;
    cyc = 0;
    if (!done) begin
      @(negedge clk);
      start = 0; a = 0; b = 0; op = FOP_NONE;
      cyc = 1;
      #1;
      while (!done) begin
        checks++;
        if (!busy) begin failures++; $display("FAIL busy low while waiting"); end
        @(negedge clk); cyc++; #1;
      end
    end
    checks++;
    if (y !== ey || fl !== efl || cyc != lat) begin
      failures++;
      $display("FAIL op=%s: %h fl=%b after %0d, exp %h fl=%b after %0d", iop.name(), y, fl, cyc, ey, efl, lat);
    end
    @(negedge clk);
    start = 0;
  endtask

  localparam logic [31:0] A = 32'h45ECF8FD, B = 32'hC3983EA1;

  initial begin
    op = FOP_NONE; a = 0; b = 0; rm = RM_RNE;
    @(negedge clk); rst_n = 1;
    run(FOP_ADD,     A, B, 32'h45E37513, 5'b00001, 0);
    run(FOP_SUB,     A, B, 32'h45F67CE7, 5'b00001, 0);
    run(FOP_MUL,     A, B, 32'hCA0CEDD0, 5'b00001, 4);
    run(FOP_DIV,     A, B, 32'hC1C73C37, 5'b00001, 28);
    run(FOP_SQRT,    A, 0, 32'h42AE298A, 5'b00001, 28);
    run(FOP_SQRT,    B, 0, QNAN,         5'b10000, 28);
    run(FOP_MIN,     A, B, B,            5'b00000, 0);
    run(FOP_MAX,     A, B, A,            5'b00000, 0);
    run(FOP_SGNJ,    A, B, 32'hC5ECF8FD, 5'b00000, 0);
    run(FOP_SGNJN,   A, B, 32'h45ECF8FD, 5'b00000, 0);
    run(FOP_SGNJX,   A, B, 32'hC5ECF8FD, 5'b00000, 0);
    run(FOP_CVT_WS,  A, 0, 32'h00001D9F, 5'b00001, 0);
    run(FOP_CVT_WS,  B, 0, 32'hFFFFFED0, 5'b00001, 0);
    run(FOP_CVT_WUS, A, 0, 32'h00001D9F, 5'b00001, 0);
    run(FOP_CVT_WUS, B, 0, 32'h00000000, 5'b10000, 0);
    run(FOP_CVT_SW,  32'hFFFFFED0, 0, 32'hC3980000, 5'b00000, 0);
    run(FOP_CVT_SWU, 32'hFFFFFED0, 0, 32'h4F7FFFFF, 5'b00001, 0);
    run(FOP_MV_XW,   A, 0, A, 5'b00000, 0);
    run(FOP_MV_WX,   B, 0, B, 5'b00000, 0);
    run(FOP_EQ,      A, B, 32'd0, 5'b00000, 0);
    run(FOP_LT,      A, B, 32'd0, 5'b00000, 0);
    run(FOP_LE,      A, B, 32'd0, 5'b00000, 0);
    run(FOP_LT,      B, A, 32'd1, 5'b00000, 0);
    run(FOP_CLASS,   A, 0, 32'h040, 5'b00000, 0);
    run(FOP_CLASS,   B, 0, 32'h002, 5'b00000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
