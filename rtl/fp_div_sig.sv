// fp_div_sig - significand divider, one quotient bit per cycle.
//
// Computes Q = floor(Mx * 2^26 / My) for normalised 24-bit significands
// (bit 23 set), so Q lies in [2^25, 2^27) and carries the 24 result bits
// plus the bits needed for rounding; the 26-bit pre-shift of the dividend
// follows the document. The algorithm is restoring shift-subtract
// division: the partial remainder starts at Mx; each step compares it with
// My, subtracts when it is not smaller and sets the quotient bit, then
// doubles the remainder. 27 steps give the 27 quotient bits, MSB first.
// rem_nz tells whether the final remainder is non-zero (sticky bit).
// load captures the operands; each cycle with step set performs one step.
// The choice of restoring division and of pre-normalised operands (instead
// of an offset correction for subnormal divisors) is this design's own.
module fp_div_sig (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        step,
  input  logic [23:0] mx,
  input  logic [23:0] my,
  output logic [26:0] quo,
  output logic        rem_nz
);
  logic [25:0] rem_q;
  logic [23:0] div_q;
  logic [26:0] quo_q;
  logic [25:0] diff;
  logic        ge;

  always_comb begin
    ge   = rem_q >= {2'b00, div_q};
    diff = rem_q - {2'b00, div_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q <= '0;
      div_q <= '0;
      quo_q <= '0;
    end else if (load) begin
      rem_q <= {2'b00, mx};
      div_q <= my;
      quo_q <= '0;
    end else if (step) begin
      quo_q <= {quo_q[25:0], ge};
      rem_q <= (ge ? diff : rem_q) << 1;
    end
  end

  assign quo    = quo_q;
  assign rem_nz = (rem_q != '0);
endmodule
