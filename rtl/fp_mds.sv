// fp_mds - multi-cycle multiply / divide / square-root unit (FMUL.S,
// FDIV.S, FSQRT.S), the "MDS" circuit.
//
// Structure: two operand decoders, an exponent handler and a sign handler
// whose outputs are registered when the operation starts, the three
// significand engines (partitioned multiplier, shift-subtract divider,
// non-restoring square root), one normaliser per operation (fp_norm for
// multiply and divide, fp_sqrt_norm for square root), a shared rounder and
// a final normaliser. The control unit fp_mds_ctrl sequences the engines.
// For divide and square root the significands are first normalised
// (leading zeros shifted out, exponent corrected), so subnormal operands
// need no special treatment in the engines.
//
// Special operands are resolved at start and override the computed result
// at the end: NaN inputs give the canonical NaN (NV for a signalling NaN);
// 0 * inf, 0 / 0, inf / inf and the square root of a negative number give
// NaN with NV; x / 0 gives infinity with DZ; other infinities and zeros
// give the obvious infinity or zero. DZ is only ever set by divide.
//
// Interface: start is accepted when busy is low; op, a, b and rm are
// sampled in that cycle. ready is high for one cycle, with result and
// flags valid, 4 cycles after start for multiply and 28 cycles after start
// for divide and square root. Every operation of a kind takes the same
// number of cycles, including special cases.
module fp_mds
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  mds_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  rm_t         rm,
  output logic        busy,
  output logic        ready,
  output logic [31:0] result,
  output fflags_t     flags
);
  localparam logic [4:0] MUL_STEPS  = 5'd3;
  localparam logic [4:0] ITER_STEPS = 5'd27;

  fp_unpacked_t ua, ub;
  fp_decoder u_dec_a (.in(a), .out(ua));
  fp_decoder u_dec_b (.in(b), .out(ub));

  // ---- start-time logic -------------------------------------------------
  logic [4:0]         lza, lzb;
  logic [23:0]        mxa, mxb;
  logic signed [11:0] exp_pre;
  logic               sqrt_odd, sign_pre, sqrt_neg;
  logic [53:0]        rad;
  logic               sp_hit;
  logic [31:0]        sp_res;
  fflags_t            sp_flags;

  always_comb begin
    lza = clz24(ua.sig);
    lzb = clz24(ub.sig);
    mxa = ua.sig << lza;
    mxb = ub.sig << lzb;
  end

  fp_exp_handler u_exp (
    .op(op), .ea(ua.exp), .lza(lza), .eb(ub.exp), .lzb(lzb),
    .exp_out(exp_pre), .sqrt_odd(sqrt_odd)
  );

  fp_sign_handler u_sign (
    .op(op), .sa(ua.sign), .sb(ub.sign), .sign(sign_pre), .sqrt_neg(sqrt_neg)
  );

  always_comb begin
    rad = sqrt_odd ? ({29'd0, mxa, 1'b0} << 29) : ({30'd0, mxa} << 29);

    sp_hit   = 1'b1;
    sp_res   = QNAN;
    sp_flags = FLAGS_NONE;
    unique case (op)
      MDS_MUL: begin
        if (ua.is_nan || ub.is_nan)
          sp_flags.nv = ua.is_snan | ub.is_snan;
        else if ((ua.is_inf && ub.is_zero) || (ua.is_zero && ub.is_inf))
          sp_flags.nv = 1'b1;
        else if (ua.is_inf || ub.is_inf)
          sp_res = {sign_pre, 8'hFF, 23'd0};
        else if (ua.is_zero || ub.is_zero)
          sp_res = {sign_pre, 31'd0};
        else
          sp_hit = 1'b0;
      end
      MDS_DIV: begin
        if (ua.is_nan || ub.is_nan)
          sp_flags.nv = ua.is_snan | ub.is_snan;
        else if ((ua.is_inf && ub.is_inf) || (ua.is_zero && ub.is_zero))
          sp_flags.nv = 1'b1;
        else if (ua.is_inf)
          sp_res = {sign_pre, 8'hFF, 23'd0};
        else if (ub.is_zero) begin
          sp_res      = {sign_pre, 8'hFF, 23'd0};
          sp_flags.dz = 1'b1;
        end else if (ua.is_zero || ub.is_inf)
          sp_res = {sign_pre, 31'd0};
        else
          sp_hit = 1'b0;
      end
      default: begin
        if (ua.is_nan)
          sp_flags.nv = ua.is_snan;
        else if (ua.is_zero)
          sp_res = {ua.sign, 31'd0};
        else if (sqrt_neg)
          sp_flags.nv = 1'b1;
        else if (ua.is_inf)
          sp_res = {1'b0, 8'hFF, 23'd0};
        else
          sp_hit = 1'b0;
      end
    endcase
  end

  // ---- control ------------------------------------------------------------
  logic load, step, ctrl_ready;

  fp_mds_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start),
    .n_iter((op == MDS_MUL) ? MUL_STEPS : ITER_STEPS),
    .load(load), .step(step), .ready(ctrl_ready), .busy(busy)
  );

  mds_op_e            op_q;
  rm_t                rm_q;
  logic               sign_q, sp_hit_q;
  logic signed [11:0] exp_q;
  logic [31:0]        sp_res_q;
  fflags_t            sp_flags_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q       <= MDS_MUL;
      rm_q       <= RM_RNE;
      sign_q     <= 1'b0;
      exp_q      <= '0;
      sp_hit_q   <= 1'b0;
      sp_res_q   <= '0;
      sp_flags_q <= FLAGS_NONE;
    end else if (load) begin
      op_q       <= op;
      rm_q       <= rm;
      sign_q     <= sign_pre;
      exp_q      <= exp_pre;
      sp_hit_q   <= sp_hit;
      sp_res_q   <= sp_res;
      sp_flags_q <= sp_flags;
    end
  end

  // ---- significand engines --------------------------------------------------
  logic [47:0] prod;
  logic [26:0] quo, root;
  logic        quo_rem_nz, root_rem_nz;

  fp_mul24 u_mul (
    .clk(clk), .rst_n(rst_n), .load(load), .step(step && op_q == MDS_MUL),
    .a(ua.sig), .b(ub.sig), .product(prod)
  );

  fp_div_sig u_div (
    .clk(clk), .rst_n(rst_n), .load(load), .step(step && op_q == MDS_DIV),
    .mx(mxa), .my(mxb), .quo(quo), .rem_nz(quo_rem_nz)
  );

  fp_sqrt_sig u_sqrt (
    .clk(clk), .rst_n(rst_n), .load(load), .step(step && op_q == MDS_SQRT),
    .rad(rad), .root(root), .rem_nz(root_rem_nz)
  );

  // ---- normalise, round, pack -------------------------------------------------
  logic [9:0]  me, de, se, ne;
  logic [23:0] ms, ds, ss, ns;
  logic        mr, mk, dr, dk, sr, sk, nr, nk;
  logic [24:0] r_sig;
  logic        r_nx;
  logic [31:0] fin_res;
  fflags_t     fin_flags;

  fp_norm #(.IW(48)) u_mul_norm (
    .sig_in(prod), .exp_in(exp_q), .sticky_in(1'b0),
    .exp_out(me), .sig_out(ms), .rnd(mr), .stk(mk)
  );

  fp_norm #(.IW(29)) u_div_norm (
    .sig_in({1'b0, quo, quo_rem_nz}), .exp_in(exp_q), .sticky_in(1'b0),
    .exp_out(de), .sig_out(ds), .rnd(dr), .stk(dk)
  );

  fp_sqrt_norm u_sqrt_norm (
    .root(root), .rem_nz(root_rem_nz), .exp_in(exp_q),
    .exp_out(se), .sig_out(ss), .rnd(sr), .stk(sk)
  );

  always_comb begin
    unique case (op_q)
      MDS_MUL: begin ne = me; ns = ms; nr = mr; nk = mk; end
      MDS_DIV: begin ne = de; ns = ds; nr = dr; nk = dk; end
      default: begin ne = se; ns = ss; nr = sr; nk = sk; end
    endcase
  end

  fp_rounder u_round (
    .sign(sign_q), .sig(ns), .rnd(nr), .stk(nk), .rm(rm_q),
    .sig_out(r_sig), .inexact(r_nx)
  );

  fp_final_norm u_final (
    .sign(sign_q), .exp(ne), .sig(r_sig), .inexact(r_nx), .rm(rm_q),
    .result(fin_res), .flags(fin_flags)
  );

  assign ready  = ctrl_ready;
  assign result = sp_hit_q ? sp_res_q   : fin_res;
  assign flags  = sp_hit_q ? sp_flags_q : fin_flags;
endmodule
