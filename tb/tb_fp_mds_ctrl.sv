// tb_fp_mds_ctrl - checks the control state machine: one load pulse per
// start, exactly n_iter step cycles, then one ready cycle, busy throughout,
// and starts ignored while busy.
module tb_fp_mds_ctrl;
  logic       clk = 0, rst_n = 0, start = 0;
  logic [4:0] n_iter;
  logic       load, step, ready, busy;
  int checks = 0, failures = 0;
  fp_mds_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .n_iter(n_iter),
                   .load(load), .step(step), .ready(ready), .busy(busy));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    int steps, loads, cyc;
    @(negedge clk);
    n_iter = 5'(n); start = 1;
    #1;
    checks++;
    if (!load || busy) begin failures++; $display("FAIL no load in IDLE"); end
    @(negedge clk);
    n_iter = 5'd1;            // n_iter only matters at start
    steps = 0; loads = 0; cyc = 1;
    while (!ready) begin
      if (step) steps++;
      if (load) loads++;
      if (!busy) begin failures++; $display("FAIL busy low"); end
      @(negedge clk); cyc++;
      start = (cyc == 3);     // a start while busy must be ignored
    end
    start = 0;
    checks++;
    if (steps != n || loads != 0 || cyc != n + 1) begin
      failures++;
      $display("FAIL n=%0d: steps=%0d loads=%0d ready after %0d", n, steps, loads, cyc);
    end
    @(negedge clk);
    checks++;
    if (busy || ready) begin failures++; $display("FAIL not back in IDLE"); end
  endtask

  initial begin
    n_iter = 5'd3;
    @(negedge clk); rst_n = 1;
    checks++;
    if (busy || load || step || ready) begin failures++; $display("FAIL reset state"); end
    run(3); run(27); run(1); run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
