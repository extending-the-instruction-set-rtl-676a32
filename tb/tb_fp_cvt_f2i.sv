// tb_fp_cvt_f2i - checks float-to-integer conversion: the document's
// example, the test-program operands, the saturation cases (NaN, +-inf,
// out-of-range, negative to unsigned) and random values in every rounding
// mode against a reference built on real floor/ceil.
module tb_fp_cvt_f2i;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;
  logic [31:0] in, y;
  logic        sg;
  rm_t         rm;
  fflags_t     fl;
  int checks = 0, failures = 0;
  fp_cvt_f2i dut (.in(in), .is_signed(sg), .rm(rm), .result(y), .flags(fl));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] v, input logic s, input logic [2:0] r);
    real x, fl_x, rx, fr;
    logic [31:0] ey;
    logic [4:0]  ef;
    x = 0.0; rx = 0.0;
    in = v; sg = s; rm = r;
    #1;
    ef = 0;
    if (is_nan32(v)) begin
      ey = s ? 32'h7FFFFFFF : 32'hFFFFFFFF; ef = 5'b10000;
    end else begin
      x = is_inf32(v) ? (v[31] ? -1.0e40 : 1.0e40) : f2r(v);
      fl_x = $floor(x);
      fr = x - fl_x;
      case (r)
        3'd1: rx = (x < 0) ? $ceil(x) : fl_x;
        3'd2: rx = fl_x;
        3'd3: rx = $ceil(x);
        3'd4: rx = (fr > 0.5 || (fr == 0.5 && x > 0)) ? fl_x + 1.0 : (fr == 0.5 ? fl_x : fl_x);
        default: rx = (fr > 0.5 || (fr == 0.5 && (fl_x / 2.0 != $floor(fl_x / 2.0)))) ? fl_x + 1.0 : fl_x;
      endcase
      if (r == 3'd4 && fr == 0.5 && x < 0) rx = fl_x;
      if (s) begin
        if (rx > 2147483647.0)       begin ey = 32'h7FFFFFFF; ef = 5'b10000; end
        else if (rx < -2147483648.0) begin ey = 32'h80000000; ef = 5'b10000; end
        else begin ey = 32'($rtoi(rx)); ef = {4'b0, rx != x}; end
      end else begin
        if (rx > 4294967295.0)       begin ey = 32'hFFFFFFFF; ef = 5'b10000; end
        else if (rx < 0.0)           begin ey = 32'h0;        ef = 5'b10000; end
        else begin ey = 32'(longint'(rx)); ef = {4'b0, rx != x}; end
      end
    end
    checks++;
    if (y !== ey || fl !== ef) begin
      failures++;
      $display("FAIL %h signed=%b rm=%0d: %h %b exp %h %b", v, s, r, y, fl, ey, ef);
    end
  endtask

  initial begin
    in = 32'h4CEB699A; sg = 1; rm = RM_RNE;   // 123423953.78845 -> 123423952 exactly
    #1;
    checks++;
    if (y !== 32'd123423952) begin failures++; $display("FAIL example -> %0d", y); end
    chk(32'h45ECF8FD, 1, 0); chk(32'hC3983EA1, 1, 0); chk(32'h45ECF8FD, 0, 0); chk(32'hC3983EA1, 0, 0);
    chk(32'h7FC00000, 1, 0); chk(32'h7F800000, 1, 0); chk(32'hFF800000, 1, 0); chk(32'hFF800000, 0, 0);
    chk(32'h4F000000, 1, 0); chk(32'hCF000000, 1, 0); chk(32'h4F800000, 0, 0); chk(32'h4F7FFFFF, 0, 0);
    chk(32'hBF000000, 0, 0); chk(32'hBF000000, 0, 2); chk(32'h3F000000, 1, 4); chk(32'hBFC00000, 1, 4);
    chk(32'h3FC00000, 1, 0); chk(32'h40200000, 1, 0); chk(32'h00000001, 1, 3);
    for (int i = 0; i < 8000; i++) begin
      logic [31:0] v;
      v = $urandom;
      v[30:23] = 8'($urandom_range(100, 160));
      chk(v, 1'($urandom), 3'($urandom_range(0, 4)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
