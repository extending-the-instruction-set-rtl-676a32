// tb_fp_ref_pkg - reference arithmetic for the floating-point testbenches.
//
// Works through the simulator's double-precision reals: a binary32 value
// is widened exactly to a real, the operation is done in double precision
// and the double is rounded to binary32 with a rounding routine that works
// on the 53-bit double significand. Products of two binary32 values are
// exact in double, so multiply results are checked in every rounding mode;
// for add, divide and square root double rounding is harmless only for
// round-to-nearest-even (53 >= 2*24 + 2), so those are checked in RNE.
package tb_fp_ref_pkg;

  function automatic real pow2(input int n);
    real r;
    r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic bit is_nan32(input logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] != 0);
  endfunction

  function automatic bit is_inf32(input logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] == 0);
  endfunction

  // exact binary32 -> real (finite inputs)
  function automatic real f2r(input logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 0) begin
      m = real'(f[22:0]);
      e = -149;
    end else begin
      m = real'({1'b1, f[22:0]});
      e = int'(f[30:23]) - 150;
    end
    m = m * pow2(e);
    return f[31] ? -m : m;
  endfunction

  // round a real (finite, non-zero magnitude or zero) to binary32
  // rm: 0 RNE, 1 RTZ, 2 RDN, 3 RUP, 4 RMM. nx returns inexactness.
  function automatic logic [31:0] r2f(input real x, input logic [2:0] rm, output bit nx);
    logic [63:0] d;
    logic        s;
    int          e, fe, sh;
    logic [52:0] m;
    logic [53:0] kept;
    bit          r, st, up, toinf;
    d  = $realtobits(x);
    s  = d[63];
    nx = 0;
    if (d[62:0] == 0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023;
    m  = {1'b1, d[51:0]};
    fe = e + 127;
    sh = 29;
    if (fe < 1) begin
      sh = 29 + (1 - fe);
      fe = 0;
    end
    if (sh > 53) begin
      kept = 0; r = 0; st = 1;
    end else begin
      kept = {1'b0, m} >> sh;
      r    = m[sh-1];
      st   = (sh >= 2) ? ((m & ((53'd1 << (sh - 1)) - 1)) != 0) : 0;
    end
    nx = r | st;
    case (rm)
      3'd1:    up = 0;
      3'd2:    up = s & nx;
      3'd3:    up = ~s & nx;
      3'd4:    up = r;
      default: up = r & (st | kept[0]);
    endcase
    kept = kept + 54'(up);
    if (kept[24]) begin kept = kept >> 1; fe = fe + 1; end
    else if (fe == 0 && kept[23]) fe = 1;
    if (fe >= 255) begin
      nx = 1;
      case (rm)
        3'd1:    toinf = 0;
        3'd2:    toinf = s;
        3'd3:    toinf = ~s;
        default: toinf = 1;
      endcase
      return toinf ? {s, 8'hFF, 23'd0} : {s, 8'hFE, 23'h7FFFFF};
    end
    return {s, 8'(fe), kept[22:0]};
  endfunction

  // random binary32 of mixed kinds: mostly normal numbers of moderate
  // exponent, some of any exponent, some subnormals
  function automatic logic [31:0] rand_f32();
    logic [31:0] v;
    int unsigned k;
    v = $urandom;
    k = $urandom_range(0, 9);
    if (k < 6)      v[30:23] = 8'($urandom_range(100, 154));
    else if (k < 8) v[30:23] = 8'($urandom_range(1, 254));
    else if (k < 9) v[30:23] = 8'd0;
    else            v[30:23] = 8'($urandom_range(1, 30));
    return v;
  endfunction

endpackage
