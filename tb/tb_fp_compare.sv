// tb_fp_compare - checks FEQ/FLT/FLE and FMIN/FMAX against comparisons of
// the real values, with signed zeros, infinities, quiet and signalling
// NaNs and the invalid flag rules.
module tb_fp_compare;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;
  logic [31:0] a, b, y;
  fpu_op_e     op;
  fflags_t     fl;
  int checks = 0, failures = 0;
  fp_compare dut (.a(a), .b(b), .op(op), .result(y), .flags(fl));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real val(input logic [31:0] f);
    if (is_inf32(f)) return f[31] ? -1.0e300 : 1.0e300;
    return f2r(f);
  endfunction

  task automatic chk(input logic [31:0] ia, input logic [31:0] ib);
    bit na, nb, sa, sb;
    real x, z;
    logic [31:0] emin, emax;
    na = is_nan32(ia); nb = is_nan32(ib);
    sa = na && !ia[22]; sb = nb && !ib[22];
    x = na ? 0.0 : val(ia); z = nb ? 0.0 : val(ib);
    if (na && nb) begin emin = QNAN; emax = QNAN; end
    else if (na) begin emin = ib; emax = ib; end
    else if (nb) begin emin = ia; emax = ia; end
    else if (x < z || (x == z && ia[31] && !ib[31])) begin emin = ia; emax = ib; end
    else if (x > z || (x == z && !ia[31] && ib[31])) begin emin = ib; emax = ia; end
    else begin emin = ia; emax = ia; end
    a = ia; b = ib;
    op = FOP_EQ; #1; checks++;
    if (y !== {31'd0, !na && !nb && x == z} || fl !== {sa || sb, 4'b0}) begin failures++; $display("FAIL feq %h %h", ia, ib); end
    op = FOP_LT; #1; checks++;
    if (y !== {31'd0, !na && !nb && x < z} || fl !== {na || nb, 4'b0}) begin failures++; $display("FAIL flt %h %h", ia, ib); end
    op = FOP_LE; #1; checks++;
    if (y !== {31'd0, !na && !nb && x <= z} || fl !== {na || nb, 4'b0}) begin failures++; $display("FAIL fle %h %h", ia, ib); end
    op = FOP_MIN; #1; checks++;
    if (y !== emin || fl !== {sa || sb, 4'b0}) begin failures++; $display("FAIL fmin %h %h -> %h", ia, ib, y); end
    op = FOP_MAX; #1; checks++;
    if (y !== emax || fl !== {sa || sb, 4'b0}) begin failures++; $display("FAIL fmax %h %h -> %h", ia, ib, y); end
  endtask

  initial begin
    logic [31:0] sp [8] = '{32'h00000000, 32'h80000000, 32'h7F800000, 32'hFF800000,
                            32'h7FC00000, 32'h7FA00000, 32'h3F800000, 32'hBF800000};
    chk(32'h45ECF8FD, 32'hC3983EA1);
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) chk(sp[i], sp[j]);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] ra, rb;
      ra = rand_f32(); rb = (i % 4 == 0) ? ra ^ 32'(1 << $urandom_range(0, 31)) : rand_f32();
      chk(ra, rb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
