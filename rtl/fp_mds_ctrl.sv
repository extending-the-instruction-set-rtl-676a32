// fp_mds_ctrl - control unit (algorithmic state machine) of the
// multiply / divide / square-root unit.
//
// The machine waits in IDLE. A start request pulses load for one cycle,
// which makes the datapath capture its operands, and moves to ITER, where
// step is asserted for n_iter cycles (27 for divide and square root, one
// per result bit; 3 for the multiplier pipeline). It then spends one cycle
// in READY with ready asserted while the rounded result is taken from the
// datapath registers, and returns to IDLE. A start is accepted only in
// IDLE; busy is high in the other states. From the start cycle to the
// ready cycle there are n_iter + 1 clock edges. The IDLE / iterate / ready
// structure follows the document; the separate READY cycle is this
// design's choice.
module fp_mds_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [4:0] n_iter,   // >= 1
  output logic       load,
  output logic       step,
  output logic       ready,
  output logic       busy
);
  typedef enum logic [1:0] {S_IDLE, S_ITER, S_READY} state_e;
  state_e     state_q;
  logic [4:0] cnt_q, last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
      last_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_ITER;
          cnt_q   <= '0;
          last_q  <= n_iter - 5'd1;
        end
        S_ITER: begin
          cnt_q <= cnt_q + 5'd1;
          if (cnt_q == last_q) state_q <= S_READY;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign load  = (state_q == S_IDLE) && start;
  assign step  = (state_q == S_ITER);
  assign ready = (state_q == S_READY);
  assign busy  = (state_q != S_IDLE);
endmodule
