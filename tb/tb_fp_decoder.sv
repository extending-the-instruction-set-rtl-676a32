// tb_fp_decoder - checks the unpacking of zero, subnormal, normal,
// infinity, quiet and signalling NaN encodings, and random words against
// field extraction written out in the testbench.
module tb_fp_decoder;
  import fpu_pkg::*;
  logic [31:0]  in;
  fp_unpacked_t u;
  int checks = 0, failures = 0;
  fp_decoder dut (.in(in), .out(u));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] v);
    int e;
    bit z, s, inf, nan, snan;
    in = v;
    #1;
    e    = (v[30:23] == 0) ? 1 : int'(v[30:23]);
    z    = v[30:0] == 0;
    s    = v[30:23] == 0 && v[22:0] != 0;
    inf  = v[30:0] == 31'h7F800000;
    nan  = v[30:23] == 8'hFF && v[22:0] != 0;
    snan = nan && !v[22];
    checks++;
    if (u.sign !== v[31] || int'(u.exp) != e || u.sig !== {v[30:23] != 0, v[22:0]} ||
        u.is_zero !== z || u.is_sub !== s || u.is_inf !== inf || u.is_nan !== nan || u.is_snan !== snan) begin
      failures++;
      $display("FAIL %h -> %p", v, u);
    end
  endtask

  initial begin
    chk(32'h00000000); chk(32'h80000000); chk(32'h00000001); chk(32'h807FFFFF);
    chk(32'h3F800000); chk(32'h7F800000); chk(32'hFF800000); chk(32'h7FC00000);
    chk(32'h7F800001); chk(32'hFFBFFFFF); chk(32'h00800000);
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] v;
      v = $urandom;
      if (i % 3 == 0) v[30:23] = 8'h00;
      if (i % 3 == 1) v[30:23] = 8'hFF;
      chk(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
