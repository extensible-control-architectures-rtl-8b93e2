// Self-checking testbench for basic_pipeline_ctrl (six stages).
// The reference treats the pipeline as a row of occupied slots. When the
// tail stall input is high, the stalled stages are the unbroken run of
// occupied slots that ends at the last stage; every other occupied stage
// advances. This run-based formulation is checked against the controller's
// per-stage accept and stall outputs under random stall patterns, and the
// fill latency after start (stage k first accepts k-1 cycles after start)
// is checked directly.
module basic_pipeline_ctrl_tb;
  localparam int N = 6;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stall = 1'b0;
  logic [N-1:0] stage, stall_stage;
  int checks = 0, failures = 0, cycle = 0, stall_cycles = 0;

  basic_pipeline_ctrl #(.N_STAGES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit occ [N];       // slot k has a point of control this cycle
  bit gen;           // the context generator has started
  bit exp_stall [N];
  bit exp_stage [N];
  int run_from;

  initial begin
    for (int k = 0; k < N; k++) occ[k] = 0;
    gen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      start = (c == 0);
      stall = (c > 20) && ($urandom_range(0, 3) == 0);
      if (c > 20 && c < 30) stall = 1'b1;  // a long stall fills the stall bits
      if (stall) stall_cycles++;
      if (start) gen = 1;
      occ[0] = gen;
      // stalled run: contiguous occupied slots from the tail backwards
      run_from = N;
      if (stall)
        for (int k = N - 1; k >= 0; k--) begin
          if (!occ[k]) break;
          run_from = k;
        end
      for (int k = 0; k < N; k++) begin
        exp_stall[k] = (k >= run_from);
        exp_stage[k] = occ[k] && !(k + 1 < N ? (k + 1 >= run_from) : stall);
      end
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (stage[k] !== exp_stage[k] || stall_stage[k] !== exp_stall[k]) begin
          failures++;
          $display("FAIL cycle %0d stage %0d: stage=%b stall=%b want %b %b", c, k + 1,
                   stage[k], stall_stage[k], exp_stage[k], exp_stall[k]);
        end
      end
      // fill latency: stage k+1 first accepts k cycles after start
      if (c < N) begin
        checks++;
        if (stage !== N'((1 << (c + 1)) - 1)) begin
          failures++;
          $display("FAIL fill cycle %0d: stage=%b", c, stage);
        end
      end
      // advance the slot model
      for (int k = N - 1; k >= 1; k--) occ[k] = exp_stage[k-1] || exp_stall[k];
      @(negedge clk);
    end
    checks++;
    if (stall_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
