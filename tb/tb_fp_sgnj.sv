// tb_fp_sgnj - checks the three sign-injection modes, including the
// test-program operands, on random words.
module tb_fp_sgnj;
  logic [31:0] a, b, y;
  logic [1:0]  mode;
  int checks = 0, failures = 0;
  fp_sgnj dut (.a(a), .b(b), .mode(mode), .result(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] ia, input logic [31:0] ib, input logic [1:0] m, input logic [31:0] ey);
    a = ia; b = ib; mode = m;
    #1;
    checks++;
    if (y !== ey) begin failures++; $display("FAIL %h %h mode=%0d -> %h exp %h", ia, ib, m, y, ey); end
  endtask

  initial begin
    chk(32'h45ECF8FD, 32'hC3983EA1, 2'd0, 32'hC5ECF8FD);
    chk(32'h45ECF8FD, 32'hC3983EA1, 2'd1, 32'h45ECF8FD);
    chk(32'h45ECF8FD, 32'hC3983EA1, 2'd2, 32'hC5ECF8FD);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] ra, rb;
      logic        s;
      ra = $urandom; rb = $urandom;
      case (i % 3)
        0: s = rb[31];
        1: s = !rb[31];
        default: s = (ra[31] != rb[31]);
      endcase
      chk(ra, rb, 2'(i % 3), {s, ra[30:0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
