// fp_mul24 - 24 x 24-bit significand multiplier built from partitions.
//
// Each operand is split into four 6-bit pieces (A = A_HH, A_HL, A_LH, A_LL,
// with A_H = A_HH*2^6 + A_HL and A = A_H*2^12 + A_L). Stage 1 forms the 16
// small products of the pieces. Stage 2 combines them into the four
// 12 x 12-bit second-level products A_H*B_H, A_H*B_L, A_L*B_H and A_L*B_L
// (X*Y = XH*YH*2^12 + (XH*YL + XL*YH)*2^6 + XL*YL). Stage 3 adds those into
// the 48-bit product A*B = AH*BH*2^24 + (AH*BL + AL*BH)*2^12 + AL*BL.
// Each stage ends in a register, so the product appears three enabled
// cycles after the operands are loaded: load captures a and b, and each
// cycle with step set advances the three stages (the first step computes
// stage 1 from the loaded operands). The fp_mds_ctrl controller issues the
// steps. The 6-bit piece size follows the document's equations 4.2-4.5
// (its text also calls the pieces 8-bit); the stage registers are this
// design's choice.
module fp_mul24 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        step,
  input  logic [23:0] a,
  input  logic [23:0] b,
  output logic [47:0] product
);
  logic [23:0] ra, rb;
  logic [11:0] pp1 [4][4];   // stage 1: pieces i of A times pieces j of B
  logic [23:0] pp2 [2][2];   // stage 2: halves i of A times halves j of B
  logic [47:0] prod_q;

  function automatic logic [23:0] comb12(input logic [11:0] hh, input logic [11:0] hl,
                                         input logic [11:0] lh, input logic [11:0] ll);
    return ({12'd0, hh} << 12) + ({12'd0, hl} << 6) + ({12'd0, lh} << 6) + {12'd0, ll};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra <= '0;
      rb <= '0;
      prod_q <= '0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) pp1[i][j] <= '0;
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) pp2[i][j] <= '0;
    end else if (load) begin
      ra <= a;
      rb <= b;
    end else if (step) begin
      // stage 1: index 3 is the most significant 6-bit piece
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          pp1[i][j] <= {6'd0, ra[6*i +: 6]} * {6'd0, rb[6*j +: 6]};
      // stage 2: index 1 is the high 12-bit half
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++)
          pp2[i][j] <= comb12(pp1[2*i+1][2*j+1], pp1[2*i+1][2*j],
                              pp1[2*i][2*j+1],   pp1[2*i][2*j]);
      // stage 3
      prod_q <= ({24'd0, pp2[1][1]} << 24) + ({24'd0, pp2[1][0]} << 12)
              + ({24'd0, pp2[0][1]} << 12) + {24'd0, pp2[0][0]};
    end
  end

  assign product = prod_q;
endmodule
