// fp_sqrt_sig - non-restoring square root of a 54-bit radicand.
//
// Implements the non-restoring algorithm of Li and Chu: the partial root Q
// and a signed partial remainder R (K+2 = 29 bits) are kept in registers.
// Each step brings down the next two radicand bits ab and, depending on
// the sign of R, either subtracts (Q << 2 | 01) or adds (Q << 2 | 11):
//   R >= 0 : R = (R << 2 | ab) - (Q << 2 | 01)
//   R <  0 : R = (R << 2 | ab) + (Q << 2 | 11)
// and the next root bit is 1 when the new R is non-negative. A single
// 29-bit adder/subtracter does the work. The radicand shift register feeds
// two bits per step, so 27 steps produce the 27-bit root, MSB first.
// rem_nz reports a non-zero final remainder (after the usual correction of
// a negative remainder), used as the sticky bit.
// load captures the radicand; each cycle with step set performs one step.
module fp_sqrt_sig (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        step,
  input  logic [53:0] rad,
  output logic [26:0] root,
  output logic        rem_nz
);
  logic [53:0]        d_q;
  logic [26:0]        q_q;
  logic signed [28:0] r_q, r_next, r_fix;

  always_comb begin
    if (!r_q[28])
      r_next = {r_q[26:0], d_q[53:52]} - {q_q[26:0], 2'b01};
    else
      r_next = {r_q[26:0], d_q[53:52]} + {q_q[26:0], 2'b11};
    r_fix = r_q[28] ? r_q + {1'b0, q_q, 1'b1} : r_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q <= '0;
      q_q <= '0;
      r_q <= '0;
    end else if (load) begin
      d_q <= rad;
      q_q <= '0;
      r_q <= '0;
    end else if (step) begin
      d_q <= {d_q[51:0], 2'b00};
      r_q <= r_next;
      q_q <= {q_q[25:0], ~r_next[28]};
    end
  end

  assign root   = q_q;
  assign rem_nz = (r_fix != '0);
endmodule
