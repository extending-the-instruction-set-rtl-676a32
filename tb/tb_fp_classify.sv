// tb_fp_classify - checks the FCLASS mask for one value of each of the ten
// classes (including the test-program operands) and that random words
// always get exactly one bit.
module tb_fp_classify;
  logic [31:0] a, y;
  int checks = 0, failures = 0;
  fp_classify dut (.a(a), .result(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] v, input int bitn);
    a = v;
    #1;
    checks++;
    if (y !== (32'd1 << bitn)) begin failures++; $display("FAIL %h -> %h exp bit %0d", v, y, bitn); end
  endtask

  initial begin
    chk(32'hFF800000, 0); chk(32'hC3983EA1, 1); chk(32'h80000001, 2); chk(32'h80000000, 3);
    chk(32'h00000000, 4); chk(32'h007FFFFF, 5); chk(32'h45ECF8FD, 6); chk(32'h7F800000, 7);
    chk(32'h7F800001, 8); chk(32'h7FC00000, 9); chk(32'hFFFFFFFF, 9);
    for (int i = 0; i < 2000; i++) begin
      a = $urandom;
      #1;
      checks++;
      if ($countones(y) != 1 || y[31:10] != 0) begin failures++; $display("FAIL %h -> %h", a, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
